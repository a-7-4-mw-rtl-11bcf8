// power_detect_tb: random pairs of non-negative floats (equal exponents,
// equal values, zeros and denormals included) against a comparison of their
// real values; checks the one-cycle latency and the channel tag.
module power_detect_tb;
  import ss_pkg::*;
  import ss_tb_pkg::*;
  localparam int L = 4;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [9:0] in_chan [L], out_chan [L];
  flt_t t_pow [L], gamma [L];
  logic decision [L];
  int checks = 0, failures = 0;
  logic expd [L];
  power_detect #(.LANES(L)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 1000; c++) begin
      @(negedge clk);
      in_valid = 1;
      for (int u = 0; u < L; u++) begin
        in_chan[u] = 10'(c * L + u);
        t_pow[u] = rand_pos(-16, 15);
        case (c % 4)
          0: gamma[u] = rand_pos(int'(t_pow[u].e), int'(t_pow[u].e));
          1: gamma[u] = t_pow[u];
          2: begin gamma[u] = rand_pos(-16, 15); if (u == 0) t_pow[u] = FLT_ZERO; end
          default: begin t_pow[u] = '{e: -5'sd16, m: 10'($urandom % 256)}; gamma[u] = '{e: -5'sd16, m: 10'($urandom % 512)}; end
        endcase
        expd[u] = flt_to_real(t_pow[u]) >= flt_to_real(gamma[u]);
      end
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid) failures++;
      for (int u = 0; u < L; u++) begin
        checks++;
        if (decision[u] !== expd[u] || out_chan[u] != 10'(c * L + u)) begin
          failures++;
          if (failures < 10) $display("FAIL c=%0d u=%0d", c, u);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
