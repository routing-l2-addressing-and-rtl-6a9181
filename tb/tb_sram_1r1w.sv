// tb_sram_1r1w: self-checking test of the synchronous memory.
// Writes random words to random addresses while keeping a shadow copy,
// then reads back with one-cycle latency, checks that rdata holds while
// re=0 and that a same-address read during a write returns the old word.
module tb_sram_1r1w;
  localparam int unsigned DEPTH = 64;
  localparam int unsigned WIDTH = 40;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic clk = 1'b0;
  logic we = 1'b0, re = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  sram_1r1w #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(logic [WIDTH-1:0] exp, string what);
    checks++;
    if (rdata !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, rdata, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill all words
    for (int a = 0; a < int'(DEPTH); a++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(a); wdata = {$urandom, $urandom};
      shadow[a] = wdata;
    end
    @(negedge clk); we = 1'b0;
    // random mix of reads and writes
    for (int i = 0; i < 400; i++) begin
      logic [AW-1:0] ra;
      logic [WIDTH-1:0] exp;
      ra = AW'($urandom);
      @(negedge clk);
      re = 1'b1; raddr = ra;
      we = $urandom_range(0, 1) == 1;
      waddr = ($urandom_range(0, 3) == 0) ? ra : AW'($urandom);
      wdata = {$urandom, $urandom};
      exp = shadow[ra];               // read-before-write
      if (we) shadow[waddr] = wdata;
      @(negedge clk);
      we = 1'b0; re = 1'b0;
      check(exp, "read");
      @(negedge clk);
      check(exp, "hold with re=0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
