// tb_lup: end-to-end test of the Lookup Processor at its default sizes.
//
// A small routing table and packet filter are compiled by hand into CAM
// rows, row results and comparison instructions, following the RAF-to-LUP
// rewriting: routes in non-increasing prefix length, for each route the
// CAMList fields (source address, input interface, protocol) expanded into
// first-match rows, the rest of the filter left to decision-diagram
// instructions shared between rows. A range on the source address is
// expanded into a block of two prefix rows.
//
// Routes:  10.1.2.0/24 -> MAC A, if 1     10.1.0.0/16 -> MAC B, if 2
//          192.168.0.0/16 -> SW            0.0.0.0/0   -> MAC C, if 3
// Filter (first match):
//   F0 daddr 10.1.2.0/24, saddr 10.0.0.0-10.0.0.5          accept
//   F1 daddr 10.1.0.0/16, proto 6, dport 22                drop
//   F2 saddr 172.16.0.0/12                                 drop
//   F3 daddr 10.1.2.0/24, proto 17, sport 53               accept
//   F4 daddr 10.1.2.0/24, dport 1024-65535                 accept
//   F5 daddr 10.1.2.0/24                                   drop
//   F6 iif 5                                               drop
//   F7 any                                                 accept
//
// The expected answer of every lookup is computed from the route list and
// the rule list directly (longest prefix, then first matching rule), not
// from the compiled tables. Random headers, biased towards the interesting
// values, are offered back to back while the result side applies random
// back-pressure. Latency is checked against the documented cycle counts.
// Each mechanism (CAM miss, SW row, terminal at the FDD root, multi-node
// FDD walk, range block rows, several matching rows, input stall, output
// stall, forward, drop) must occur at least once.
module tb_lup;
  import lup_pkg::*;

  localparam int unsigned CAM_ROWS = 512;
  localparam int unsigned RW = $clog2(CAM_ROWS);
  localparam int NPKT = 4000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cam_we = 1'b0, cam_wvalid = 1'b0;
  logic [RW-1:0] cam_widx = '0;
  key_t cam_wvalue = '0, cam_wcare = '0;
  logic res_we = 1'b0;
  logic [RW-1:0] res_widx = '0;
  cam_res_t res_wdata = '0;
  logic imem_we = 1'b0;
  logic [IA_W-1:0] imem_waddr = '0;
  instr_t imem_wdata = '0;
  logic in_valid = 1'b0, in_ready;
  hdr_t in_hdr = '0;
  logic out_valid, out_ready = 1'b0;
  action_e out_action;
  logic [MAC_W-1:0] out_mac;
  logic [IF_W-1:0] out_oif;
  logic out_hit;
  logic [RW-1:0] out_row;
  logic [IA_W:0] out_steps;

  lup dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------------------------------------------------------- model
  localparam logic [MAC_W-1:0] MAC_A = 48'h02_00_00_00_0a_01;
  localparam logic [MAC_W-1:0] MAC_B = 48'h02_00_00_00_0b_02;
  localparam logic [MAC_W-1:0] MAC_C = 48'h02_00_00_00_0c_03;

  function automatic logic pfx(logic [31:0] a, logic [31:0] p, int len);
    logic [31:0] m;
    m = (len == 0) ? 32'h0 : ~((32'h1 << (32 - len)) - 1);
    return (a & m) == (p & m);
  endfunction

  // route lookup: returns 0..3 (A, B, SW, C)
  function automatic int route(hdr_t h);
    if (pfx(h.daddr, 32'h0a01_0200, 24)) return 0;
    if (pfx(h.daddr, 32'h0a01_0000, 16)) return 1;
    if (pfx(h.daddr, 32'hc0a8_0000, 16)) return 2;
    return 3;
  endfunction

  // first-match filter: 1 = accept, 0 = drop
  function automatic logic filter(hdr_t h);
    logic d24 = pfx(h.daddr, 32'h0a01_0200, 24);
    logic d16 = pfx(h.daddr, 32'h0a01_0000, 16);
    if (d24 && h.saddr >= 32'h0a00_0000 && h.saddr <= 32'h0a00_0005) return 1'b1;
    if (d16 && h.proto == 8'd6 && h.dport == 16'd22) return 1'b0;
    if (pfx(h.saddr, 32'hac10_0000, 12)) return 1'b0;
    if (d24 && h.proto == 8'd17 && h.sport == 16'd53) return 1'b1;
    if (d24 && h.dport >= 16'd1024) return 1'b1;
    if (d24) return 1'b0;
    if (h.iif == 4'd5) return 1'b0;
    return 1'b1;
  endfunction

  // ---------------------------------------------------------------- tables
  // CAM row under construction: value and care of each column
  typedef struct {
    logic [31:0] da; int dl;          // destination prefix
    logic [31:0] sa; int sl;          // source prefix
    logic [3:0] iif; logic iif_c;     // input interface, cared?
    logic [7:0] pr;  logic pr_c;      // protocol, cared?
    cam_res_t res;
  } row_t;

  row_t rows [$];
  key_t shv [$];
  key_t shc [$];
  int nloaded = 0;

  function automatic logic [31:0] pmask(int len);
    return (len == 0) ? 32'h0 : ~((32'h1 << (32 - len)) - 1);
  endfunction

  function automatic row_t mk(logic [31:0] da, int dl, logic [31:0] sa, int sl,
                              int iif, int pr, logic sw, logic [MAC_W-1:0] mac,
                              int oif, int root);
    row_t r;
    r.da = da; r.dl = dl; r.sa = sa; r.sl = sl;
    r.iif = 4'(iif < 0 ? 0 : iif); r.iif_c = (iif >= 0);
    r.pr  = 8'(pr < 0 ? 0 : pr);   r.pr_c  = (pr >= 0);
    r.res.sw = sw; r.res.mac = mac; r.res.oif = IF_W'(oif); r.res.root = IA_W'(root);
    return r;
  endfunction

  function automatic int row_index(int i);
    return 2 * i + 5;   // spread rows over the CAM, first-match order kept
  endfunction

  task automatic load_row(int i);
    row_t r = rows[i];
    key_t v, c;
    v = {r.da & pmask(r.dl), r.sa & pmask(r.sl), r.iif, r.pr};
    c = {pmask(r.dl), pmask(r.sl), {4{r.iif_c}}, {8{r.pr_c}}};
    shv.push_back(v); shc.push_back(c);
    @(negedge clk);
    cam_we = 1'b1; cam_widx = RW'(row_index(i)); cam_wvalid = 1'b1;
    cam_wvalue = v; cam_wcare = c;
    res_we = 1'b1; res_widx = RW'(row_index(i)); res_wdata = r.res;
    @(negedge clk);
    cam_we = 1'b0; res_we = 1'b0;
  endtask

  task automatic load_instr(int a, instr_t ins);
    @(negedge clk);
    imem_we = 1'b1; imem_waddr = IA_W'(a); imem_wdata = ins;
    @(negedge clk);
    imem_we = 1'b0;
  endtask

  function automatic instr_t term(action_e a);
    instr_t i = '0;
    i.op = OP_TERM; i.act = a;
    return i;
  endfunction

  function automatic instr_t test(field_e f, int lo, int hi, int nh, int nl);
    instr_t i = '0;
    i.op = OP_TEST; i.field = f; i.lo = 32'(lo); i.hi = 32'(hi);
    i.nxt_hi = IA_W'(nh); i.nxt_lo = IA_W'(nl);
    return i;
  endfunction

  // ---------------------------------------------------------------- traffic
  function automatic hdr_t gen(logic to_default_only);
    hdr_t h;
    int k;
    k = $urandom_range(0, 9);
    if (to_default_only)     h.daddr = {8'd11, 24'($urandom)};
    else if (k < 3)          h.daddr = {24'h0a0102, 8'($urandom)};
    else if (k < 6)          h.daddr = {16'h0a01, 16'($urandom)};
    else if (k < 7)          h.daddr = {16'hc0a8, 16'($urandom)};
    else                     h.daddr = $urandom;
    k = $urandom_range(0, 9);
    if (to_default_only)     h.saddr = {8'd12, 24'($urandom)};
    else if (k < 2)          h.saddr = {12'hac1, 20'($urandom)};
    else if (k < 4)          h.saddr = 32'h0a00_0000 + 32'($urandom_range(0, 7));
    else                     h.saddr = $urandom;
    h.iif   = ($urandom_range(0, 3) == 0) ? 4'd5 : 4'($urandom);
    k = $urandom_range(0, 2);
    h.proto = (k == 0) ? 8'd6 : (k == 1) ? 8'd17 : 8'($urandom);
    h.sport = ($urandom_range(0, 3) == 0) ? 16'd53 : 16'($urandom);
    k = $urandom_range(0, 2);
    h.dport = (k == 0) ? 16'd22 : (k == 1) ? 16'($urandom_range(0, 1023)) : 16'($urandom);
    return h;
  endfunction

  int n_miss = 0, n_sw = 0, n_root_term = 0, n_walk = 0, n_walk3 = 0, n_range = 0;
  int n_multi = 0, n_in_stall = 0, n_out_stall = 0, n_fwd = 0, n_drop = 0;

  typedef struct {
    hdr_t h;
    longint t_acc;
    logic expect_miss;
  } item_t;
  item_t fifo [$];
  int done_cnt = 0;
  int target = 0;
  logic drop_ready_rand = 1'b1;

  // producer: offers headers back to back, holds them while in_ready is low
  task automatic produce(int n, logic miss_phase);
    for (int i = 0; i < n; i++) begin
      item_t it;
      it.h = gen(miss_phase);
      it.expect_miss = miss_phase;
      @(negedge clk);
      in_valid = 1'b1; in_hdr = it.h;
      while (!in_ready) begin
        n_in_stall++;
        @(negedge clk);
      end
      it.t_acc = cyc;           // accepted at the coming edge
      fifo.push_back(it);
    end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  // consumer: random out_ready, checks each result
  logic out_seen = 1'b0;
  longint t_first = 0;
  always @(negedge clk) begin
    if (out_valid && !out_seen) begin
      out_seen = 1'b1;
      t_first = cyc;
    end
    out_ready = ($urandom_range(0, 3) != 0);
    if (out_valid && !out_ready) n_out_stall++;
    if (out_valid && out_ready) begin
      item_t it;
      int rt, lat, exp_lat, nmatch;
      action_e ea;
      key_t k;
      out_seen = 1'b0;
      if (fifo.size() == 0) begin
        failures++; $display("FAIL unexpected result");
      end else begin
        it = fifo.pop_front();
        rt = route(it.h);
        ea = (it.expect_miss || rt == 2) ? ACT_HOST : filter(it.h) ? ACT_FORWARD : ACT_DROP;
        lat = int'(t_first - it.t_acc) - 1;   // clock edges after the accepting one
        exp_lat = it.expect_miss ? 1 : (rt == 2) ? 2 : int'(out_steps) + 3;
        checks++;
        if (out_action !== ea || out_hit !== !it.expect_miss ||
            (ea == ACT_FORWARD && (out_mac !== (rt == 0 ? MAC_A : rt == 1 ? MAC_B : MAC_C) ||
                                   out_oif !== IF_W'(rt == 0 ? 1 : rt == 1 ? 2 : 3)))) begin
          failures++;
          $display("FAIL hdr=%h action=%s expected %s hit=%b row=%0d mac=%h oif=%0d",
                   it.h, out_action.name(), ea.name(), out_hit, out_row, out_mac, out_oif);
        end
        checks++;
        if (lat != exp_lat || (ea != ACT_HOST && out_steps == 0)) begin
          failures++;
          $display("FAIL latency %0d expected %0d (steps %0d)", lat, exp_lat, out_steps);
        end
        // mechanism coverage
        if (!out_hit) n_miss++;
        if (out_hit && rt == 2) n_sw++;
        if (out_steps == 1) n_root_term++;
        if (out_steps >= 2) n_walk++;
        if (out_steps >= 3) n_walk3++;
        if (out_hit && (out_row == RW'(row_index(0)) || out_row == RW'(row_index(1)))) n_range++;
        if (ea == ACT_FORWARD) n_fwd++;
        if (ea == ACT_DROP) n_drop++;
        k = make_key(it.h);
        nmatch = 0;
        for (int r = 0; r < shv.size(); r++)
          if (((k ^ shv[r]) & shc[r]) == '0) nmatch++;
        if (nmatch > 1) n_multi++;
      end
      done_cnt++;
    end
  end

  task automatic wait_done(int n);
    int guard = 0;
    while (done_cnt < n && guard < 100000) begin @(negedge clk); guard++; end
  endtask

  task automatic need(int n, string what);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never seen: %s", what); end
    $display("  %-28s %0d", what, n);
  endtask

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // instructions (FDD nodes shared by all rows)
    //   0 drop   1 accept
    //   2 dport in 1024..65535 ? accept : drop
    //   3 sport == 53 ? accept : node 2
    //   4 dport == 22 ? drop : accept
    //   5 iif == 5 ? drop : accept
    // rows, in first-match order
    rows.push_back(mk(32'h0a010200, 24, 32'h0a000000, 30, -1, -1, 0, MAC_A, 1, 1)); // F0 block
    rows.push_back(mk(32'h0a010200, 24, 32'h0a000004, 31, -1, -1, 0, MAC_A, 1, 1)); // F0 block
    rows.push_back(mk(32'h0a010200, 24, 32'hac100000, 12, -1, -1, 0, MAC_A, 1, 0)); // F2
    rows.push_back(mk(32'h0a010200, 24, 32'h0,         0, -1,  6, 0, MAC_A, 1, 2)); // proto 6
    rows.push_back(mk(32'h0a010200, 24, 32'h0,         0, -1, 17, 0, MAC_A, 1, 3)); // proto 17
    rows.push_back(mk(32'h0a010200, 24, 32'h0,         0, -1, -1, 0, MAC_A, 1, 2));
    rows.push_back(mk(32'h0a010000, 16, 32'hac100000, 12, -1, -1, 0, MAC_B, 2, 0)); // F1/F2
    rows.push_back(mk(32'h0a010000, 16, 32'h0,         0,  5, -1, 0, MAC_B, 2, 0)); // iif 5 (F1/F6)
    rows.push_back(mk(32'h0a010000, 16, 32'h0,         0, -1,  6, 0, MAC_B, 2, 4)); // proto 6
    rows.push_back(mk(32'h0a010000, 16, 32'h0,         0, -1, -1, 0, MAC_B, 2, 1));
    rows.push_back(mk(32'hc0a80000, 16, 32'h0,         0, -1, -1, 1, '0,    0, 0)); // SW
    rows.push_back(mk(32'h0,         0, 32'hac100000, 12, -1, -1, 0, MAC_C, 3, 0)); // F2
    rows.push_back(mk(32'h0,         0, 32'h0,         0, -1, -1, 0, MAC_C, 3, 5)); // default

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load_instr(0, term(ACT_DROP));
    load_instr(1, term(ACT_FORWARD));
    load_instr(2, test(F_DPORT, 1024, 65535, 1, 0));
    load_instr(3, test(F_SPORT, 53, 53, 1, 2));
    load_instr(4, test(F_DPORT, 22, 22, 0, 1));
    load_instr(5, test(F_IIF, 5, 5, 0, 1));
    // all rows but the two default-route rows: traffic to 11/8 misses
    for (int i = 0; i < 11; i++) load_row(i);
    target = 40;
    produce(40, 1'b1);
    wait_done(target);
    load_row(11);
    load_row(12);
    target += NPKT;
    produce(NPKT, 1'b0);
    wait_done(target);

    checks++;
    if (done_cnt != target || fifo.size() != 0) begin
      failures++; $display("FAIL %0d results for %0d headers", done_cnt, target);
    end
    $display("mechanisms:");
    need(n_miss, "CAM miss -> host");
    need(n_sw, "SW row -> host");
    need(n_root_term, "terminal at FDD root");
    need(n_walk, "FDD walk of 2+ nodes");
    need(n_walk3, "FDD walk of 3 nodes");
    need(n_range, "range block row hit");
    need(n_multi, "several rows match");
    need(n_in_stall, "input stall cycles");
    need(n_out_stall, "output stall cycles");
    need(n_fwd, "forwarded");
    need(n_drop, "dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
