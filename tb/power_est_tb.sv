// power_est_tb: feeds frames of random FFT outputs (128 cycles x 8 lanes)
// into the power estimator under different controls and reads both stores
// back through the read port, comparing every word with a reference
// floating-point model: M1 accumulates three frames, M2 two frames, then M1
// is restarted with channel-specific limits (only frames below M(k) count).
module power_est_tb;
  import ss_pkg::*;
  import ss_tb_pkg::*;
  localparam int IW = 20;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, acc_en = 0, tgt = 0, first = 0, lim_en = 0;
  logic [6:0] in_k2 = 0, lim_raddr;
  logic signed [IW-1:0] in_re [8], in_im [8];
  logic [13:0] frame_idx = 0;
  logic [13:0] lim_rdata [8];
  logic [6:0] rd_addr [8];
  flt_t rd_m1 [8], rd_m2 [8], rd_data [8];
  int checks = 0, failures = 0;
  flt_t m1 [1024], m2 [1024];
  int lim [1024];

  power_est #(.IW(IW)) dut (.*);
  always #5 clk = ~clk;

  // limit memory model: one-cycle read
  always @(posedge clk) for (int l = 0; l < 8; l++) lim_rdata[l] <= 14'(lim[128 * l + lim_raddr]);

  function automatic flt_t ref_pow(input int re, input int im);
    flt_t a, b;
    a = ref_norm(longint'(re), -6);
    b = ref_norm(longint'(im), -6);
    return ref_add(ref_mul(a, a), ref_mul(b, b));
  endfunction

  task automatic frame(input logic t, input logic f, input logic le, input int idx);
    for (int c = 0; c < 128; c++) begin
      @(negedge clk);
      in_valid = 1; acc_en = 1; tgt = t; first = f; lim_en = le; frame_idx = 14'(idx);
      in_k2 = 7'((c * 37) % 128);     // any order of bins
      for (int l = 0; l < 8; l++) begin
        int re, im, nb, k;
        flt_t p;
        nb = 4 + int'($urandom % 15);
        re = int'($signed($urandom)) >>> (32 - nb);
        im = int'($signed($urandom)) >>> (32 - nb);
        in_re[l] = IW'(re); in_im[l] = IW'(im);
        k = 128 * l + int'(in_k2);
        p = ref_pow(re, im);
        if (!le || idx < lim[k]) begin
          if (t) m2[k] = f ? p : ref_add(m2[k], p);
          else   m1[k] = f ? p : ref_add(m1[k], p);
        end
      end
    end
    @(negedge clk); in_valid = 0; acc_en = 0;
  endtask

  task automatic check_all(input logic sel);
    for (int a = 0; a < 128; a++) begin
      @(negedge clk);
      for (int l = 0; l < 8; l++) rd_addr[l] = 7'(a);
      @(posedge clk); #1;
      rd_data = sel ? rd_m2 : rd_m1;
      for (int l = 0; l < 8; l++) begin
        flt_t e;
        e = sel ? m2[128 * l + a] : m1[128 * l + a];
        checks++;
        if (rd_data[l] !== e) begin
          failures++;
          if (failures < 10) $display("FAIL sel=%0d k=%0d got (%0d,%0d) exp (%0d,%0d)", sel, 128 * l + a,
                                      rd_data[l].m, rd_data[l].e, e.m, e.e);
        end
      end
    end
  endtask

  initial begin
    for (int k = 0; k < 1024; k++) lim[k] = 1 + int'($urandom % 3);
    for (int l = 0; l < 8; l++) rd_addr[l] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    frame(0, 1, 0, 0); frame(0, 0, 0, 1); frame(0, 0, 0, 2);
    frame(1, 1, 0, 0); frame(1, 0, 0, 1);
    check_all(0); check_all(1);
    frame(0, 1, 1, 0); frame(0, 0, 1, 1); frame(0, 0, 1, 2); frame(0, 0, 1, 3);
    check_all(0); check_all(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
