// ss_ram_tb: checks the dual-port bank against an array model.  Random
// writes and reads on every cycle, including reads of the address being
// written (the old word must come out: read-before-write), and the one-cycle
// read latency.  The bank is first filled completely so that no unwritten
// word is read.
module ss_ram_tb;
  localparam int DW = 15, DEPTH = 128;
  logic clk = 1'b0;
  logic we;
  logic [6:0] waddr, raddr;
  logic [DW-1:0] wdata, rdata;
  logic [DW-1:0] model [DEPTH];
  logic [DW-1:0] expect_q;
  int checks = 0, failures = 0;

  ss_ram #(.DW(DW), .DEPTH(DEPTH)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  initial begin
    we = 1'b0; waddr = '0; raddr = '0; wdata = '0;
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = 7'(a); wdata = DW'($urandom);
      @(posedge clk); model[a] = wdata;
    end
    // random traffic
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we    = ($urandom % 2) == 0;
      waddr = 7'($urandom);
      raddr = (i % 5 == 0) ? waddr : 7'($urandom);
      wdata = DW'($urandom);
      expect_q = model[raddr];
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== expect_q) begin
        failures++;
        if (failures < 10) $display("read mismatch: got %h expected %h", rdata, expect_q);
      end
    end
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
