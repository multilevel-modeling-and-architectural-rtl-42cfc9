// nasic_delay: CYCLES buffer tiles in a row, delaying WIDTH dual-rail
// signals by CYCLES clock cycles. CYCLES = 0 is a plain connection.
module nasic_delay #(
  parameter int unsigned WIDTH  = 1,
  parameter int unsigned CYCLES = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [3:0]       ph,
  input  logic [WIDTH-1:0] in_p,
  input  logic [WIDTH-1:0] in_n,
  output logic [WIDTH-1:0] out_p,
  output logic [WIDTH-1:0] out_n
);

  if (CYCLES == 0) begin : g_wire
    assign out_p = in_p;
    assign out_n = in_n;
  end else begin : g_chain
    logic [WIDTH-1:0] p [CYCLES+1];
    logic [WIDTH-1:0] n [CYCLES+1];
    assign p[0] = in_p;
    assign n[0] = in_n;
    for (genvar k = 0; k < int'(CYCLES); k++) begin : g_tile
      nasic_buffer_tile #(.WIDTH(WIDTH)) u_buf (
        .clk, .rst_n, .ph, .in_p(p[k]), .in_n(n[k]), .out_p(p[k+1]), .out_n(n[k+1]));
    end
    assign out_p = p[CYCLES];
    assign out_n = n[CYCLES];
  end

endmodule
