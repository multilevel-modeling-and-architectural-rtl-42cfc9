// sw_loop_line: fixed delay of DEPTH clock cycles for a WIDTH-bit word, the
// model of a long chain of NML clock zones inside a processing-element loop.
//
// Built as a circular buffer: a single pointer walks 0..DEPTH-1; each cycle
// the word stored DEPTH cycles ago is read at the pointer and the new word is
// written in its place, so `dout` is `din` delayed by exactly DEPTH cycles.
// The storage has no reset; until the pointer has wrapped once after reset
// the output reads as zero, which is what a reset shift register would give.
module sw_loop_line #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 208
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PTR_W-1:0] ptr;
  logic             primed;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr    <= '0;
      primed <= 1'b0;
    end else if (ptr == PTR_W'(DEPTH-1)) begin
      ptr    <= '0;
      primed <= 1'b1;
    end else begin
      ptr <= ptr + 1'b1;
    end
  end

  always_ff @(posedge clk) mem[ptr] <= din;

  assign dout = primed ? mem[ptr] : '0;

endmodule
