// tb_sw_pe_config: checks the configuration decoder of PE 5: writes for
// this PE become score-memory or gap writes, writes for other PEs and
// out-of-range addresses are ignored, and the slot control bits become the
// read address, init (valid first amino acid) and hold (bubble).
module tb_sw_pe_config;
  import sw_pkg::*;
  sw_cfg_t cfg;
  sw_token_t tok;
  logic mem_we, gap_we, init, hold;
  logic [AA_W-1:0] mem_waddr, mem_raddr;
  logic [SCORE_W-1:0] mem_wdata;
  int checks = 0, failures = 0;

  sw_pe_config #(.PE_ID(5)) dut (.cfg, .tok, .mem_we, .mem_waddr, .mem_wdata, .gap_we, .mem_raddr, .init, .hold);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2000; k++) begin
      logic e_we, e_gap;
      cfg = sw_cfg_t'($urandom);
      tok = sw_token_t'($urandom);
      if (k % 3 == 0) cfg.pe = 5;
      if (k % 7 == 0) cfg.addr = GAP_ADDR;
      #1;
      e_we  = cfg.we && cfg.pe == 5 && cfg.addr < 23;
      e_gap = cfg.we && cfg.pe == 5 && cfg.addr == 31;
      checks++;
      if (mem_we != e_we || gap_we != e_gap || (e_we && (mem_waddr != cfg.addr || mem_wdata != cfg.data))
          || mem_raddr != tok.aa || init != (tok.valid && tok.first) || hold != !tok.valid) begin
        failures++;
        $display("FAIL cfg=%h tok=%h: we=%b gap=%b init=%b hold=%b", cfg, tok, mem_we, gap_we, init, hold);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
