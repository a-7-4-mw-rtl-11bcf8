// mw_window_tb: loads random window coefficients, streams blocks of random
// samples and checks each output against sum_p w[pos + p*D] x[block-(TAPS-1-p)]
// computed from the recorded input history.  Runs the default two-tap window
// with full D = 128 and a three-tap instance with a short block.
module mw_window_tb;
  localparam int DW = 12, CW = 12;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  // two instances: (TAPS=2, D=128) and (TAPS=3, D=8)
  logic cw_en = 0;
  logic [1:0] cw_tap = 0;
  logic [6:0] cw_pos = 0;
  logic [CW-1:0] cw_data = 0;
  logic in_valid = 0;
  logic [6:0] in_pos = 0;
  logic signed [DW-1:0] in_re = 0, in_im = 0;
  logic v2, v3;
  logic [6:0] p2;
  logic [2:0] p3;
  logic signed [12:0] r2, i2;
  logic signed [13:0] r3, i3;
  logic sel3 = 0;

  mw_window #(.TAPS(2), .D(128)) u2 (.clk, .rst_n, .cw_en(cw_en && !sel3), .cw_tap(cw_tap[0]),
    .cw_pos(cw_pos), .cw_data, .in_valid(in_valid && !sel3), .in_pos(in_pos), .in_re, .in_im,
    .out_valid(v2), .out_pos(p2), .out_re(r2), .out_im(i2));
  mw_window #(.TAPS(3), .D(8)) u3 (.clk, .rst_n, .cw_en(cw_en && sel3), .cw_tap(cw_tap),
    .cw_pos(cw_pos[2:0]), .cw_data, .in_valid(in_valid && sel3), .in_pos(in_pos[2:0]), .in_re, .in_im,
    .out_valid(v3), .out_pos(p3), .out_re(r3), .out_im(i3));

  int w [3][128];
  int hr [8][128], hi [8][128];   // history: block index, position

  task automatic run(input int taps, input int d, input int blocks);
    int outs;
    outs = 0;
    for (int p = 0; p < taps; p++)
      for (int n = 0; n < d; n++) begin
        @(negedge clk);
        w[p][n] = int'($urandom % 4096);
        cw_en = 1; cw_tap = 2'(p); cw_pos = 7'(n); cw_data = CW'(w[p][n]);
      end
    @(negedge clk); cw_en = 0;
    for (int b = 0; b < blocks; b++)
      for (int n = 0; n < d; n++) begin
        @(negedge clk);
        hr[b][n] = int'($urandom % 4096) - 2048;
        hi[b][n] = int'($urandom % 4096) - 2048;
        in_valid = 1; in_pos = 7'(n); in_re = DW'(hr[b][n]); in_im = DW'(hi[b][n]);
        @(posedge clk); #1;
        if ((taps == 2 ? v2 : v3) == 1'b1) begin
          longint er, ei;
          er = 0; ei = 0;
          for (int p = 0; p < taps; p++) begin
            er += longint'(w[p][n]) * hr[b - (taps - 1 - p)][n];
            ei += longint'(w[p][n]) * hi[b - (taps - 1 - p)][n];
          end
          er = er >>> CW; ei = ei >>> CW;
          outs++;
          checks++;
          if ((taps == 2 ? (longint'(r2) != er || longint'(i2) != ei || int'(p2) != n)
                         : (longint'(r3) != er || longint'(i3) != ei || int'(p3) != n))) begin
            failures++;
            if (failures < 10) $display("FAIL taps=%0d b=%0d n=%0d exp (%0d,%0d)", taps, b, n, er, ei);
          end
        end
      end
    @(negedge clk); in_valid = 0;
    // outputs only once TAPS-1 blocks are buffered
    checks++;
    if (outs != (blocks - taps + 1) * d) begin failures++; $display("FAIL outs=%0d", outs); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    sel3 = 0; run(2, 128, 4);
    sel3 = 1; run(3, 8, 7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
