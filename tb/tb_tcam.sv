// tb_tcam: self-checking test of the first-match ternary CAM.
// Loads rows with random values and care masks, keeping a shadow copy, and
// issues back-to-back searches with keys derived from stored rows (so that
// several rows often match). The reference scans the shadow rows from
// index 0 and takes the first valid match. Also checks invalidation and
// the one-cycle result latency.
module tb_tcam;
  localparam int unsigned ROWS = 64;
  localparam int unsigned W    = 76;
  localparam int unsigned IW   = $clog2(ROWS);

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0, wr_valid = 1'b0;
  logic [IW-1:0] wr_idx = '0;
  logic [W-1:0] wr_value = '0, wr_care = '0;
  logic srch_en = 1'b0;
  logic [W-1:0] srch_key = '0;
  logic res_valid, res_hit;
  logic [IW-1:0] res_idx;

  logic [W-1:0] s_val [ROWS];
  logic [W-1:0] s_care [ROWS];
  logic s_vld [ROWS];
  int checks = 0, failures = 0;
  int multi = 0, misses = 0;

  tcam #(.ROWS(ROWS), .W(W)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [W-1:0] rnd();
    return {12'($urandom), $urandom, $urandom};
  endfunction

  // Expected {hit, idx} and number of matching rows.
  function automatic void ref_search(logic [W-1:0] k, output logic h,
                                     output logic [IW-1:0] i, output int n);
    h = 1'b0; i = '0; n = 0;
    for (int r = 0; r < int'(ROWS); r++)
      if (s_vld[r] && (((k ^ s_val[r]) & s_care[r]) == '0)) begin
        if (!h) i = IW'(r);
        h = 1'b1; n++;
      end
  endfunction

  task automatic write_row(int r, logic v, logic [W-1:0] val, logic [W-1:0] care);
    @(negedge clk);
    wr_en = 1'b1; wr_idx = IW'(r); wr_valid = v; wr_value = val; wr_care = care;
    s_vld[r] = v; s_val[r] = val; s_care[r] = care;
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pending expectation for the result one cycle later
  logic          p_chk = 1'b0, p_h;
  logic [IW-1:0] p_i;

  always @(posedge clk) begin
    #1;
    if (p_chk) begin
      checks++;
      if (!res_valid || res_hit !== p_h || (p_h && res_idx !== p_i)) begin
        failures++;
        $display("FAIL search: valid=%b hit=%b idx=%0d expected hit=%b idx=%0d",
                 res_valid, res_hit, res_idx, p_h, p_i);
      end
    end
  end

  task automatic search_burst(int n);
    for (int s = 0; s < n; s++) begin
      logic [W-1:0] k;
      logic h; logic [IW-1:0] i; int cnt;
      int r;
      r = $urandom_range(0, ROWS - 1);
      // key = a stored row's value with its don't-care bits randomised
      k = (s_val[r] & s_care[r]) | (rnd() & ~s_care[r]);
      if ($urandom_range(0, 7) == 0) k = rnd();
      ref_search(k, h, i, cnt);
      if (cnt > 1) multi++;
      if (!h) misses++;
      @(negedge clk);
      srch_en = 1'b1; srch_key = k;
      p_chk <= 1'b1; p_h <= h; p_i <= i;
    end
    @(negedge clk);
    srch_en = 1'b0;
    p_chk <= 1'b0;
    @(negedge clk);
  endtask

  initial begin
    for (int r = 0; r < int'(ROWS); r++) s_vld[r] = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // empty CAM: every search misses
    search_burst(10);
    // load rows; care masks cover few key bits so that rows overlap
    for (int r = 0; r < int'(ROWS); r++) begin
      logic [W-1:0] care;
      care = rnd() & rnd() & rnd() & rnd();
      if (r == ROWS - 1) care = '0;             // default row
      write_row(r, ($urandom_range(0, 9) != 0), rnd(), care);
    end
    search_burst(500);
    // invalidate a set of rows and search again
    for (int r = 0; r < int'(ROWS); r += 3) write_row(r, 1'b0, s_val[r], s_care[r]);
    search_burst(500);
    checks++;
    if (multi < 50 || misses < 10) begin
      failures++;
      $display("FAIL coverage: multi=%0d misses=%0d", multi, misses);
    end
    $display("multi-match searches %0d, misses %0d", multi, misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
