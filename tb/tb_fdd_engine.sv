// tb_fdd_engine: self-checking test of the comparison-instruction engine.
// Loads a random decision diagram (test nodes only jump forward, so the
// program is a DAG; the last nodes are terminals), then starts lookups with
// random headers and random roots. A reference walk of the same program in
// the testbench gives the expected action and path length; the done pulse
// must come exactly N+1 cycles after the start cycle for a path of N nodes.
module tb_fdd_engine;
  import lup_pkg::*;

  localparam int unsigned NODES = 96;
  localparam int unsigned NTERM = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic imem_we = 1'b0;
  logic [IA_W-1:0] imem_waddr = '0;
  instr_t imem_wdata = '0;
  logic start = 1'b0;
  logic [IA_W-1:0] root = '0;
  hdr_t hdr = '0;
  logic busy, done;
  action_e action;
  logic [IA_W:0] nsteps;

  instr_t prog [NODES];
  int checks = 0, failures = 0;
  int len_hist [32];

  fdd_engine dut (.*);

  always #5 clk = ~clk;

  function automatic logic [VAL_W-1:0] pick(hdr_t h, field_e f);
    case (f)
      F_DADDR: return h.daddr;
      F_SADDR: return h.saddr;
      F_IIF:   return {28'd0, h.iif};
      F_PROTO: return {24'd0, h.proto};
      F_SPORT: return {16'd0, h.sport};
      default: return {16'd0, h.dport};
    endcase
  endfunction

  function automatic void walk(hdr_t h, int r, output action_e a, output int n);
    int pc = r;
    n = 0;
    forever begin
      n++;
      if (prog[pc].op == OP_TERM) begin a = prog[pc].act; return; end
      begin
        logic [VAL_W-1:0] v = pick(h, prog[pc].field);
        pc = (v >= prog[pc].lo && v <= prog[pc].hi) ? int'(prog[pc].nxt_hi)
                                                     : int'(prog[pc].nxt_lo);
      end
    end
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) len_hist[i] = 0;
    // build the program
    for (int i = 0; i < int'(NODES); i++) begin
      instr_t ins;
      ins = '0;
      if (i >= int'(NODES - NTERM)) begin
        ins.op  = OP_TERM;
        ins.act = action_e'($urandom_range(0, 2));
      end else begin
        logic [VAL_W-1:0] c;
        ins.op    = OP_TEST;
        ins.field = field_e'($urandom_range(0, 5));
        // ranges that hold for about half of the values
        case (ins.field)
          F_DADDR, F_SADDR: begin c = $urandom; ins.lo = c >> 1; ins.hi = (c >> 1) + 32'h8000_0000; end
          F_IIF:   begin ins.lo = 0;  ins.hi = 7; end
          F_PROTO: begin ins.lo = 32'($urandom_range(0, 127)); ins.hi = ins.lo + 127; end
          default: begin ins.lo = 32'($urandom_range(0, 32767)); ins.hi = ins.lo + 32767; end
        endcase
        ins.nxt_hi = IA_W'($urandom_range(i + 1, i + 6 < int'(NODES) ? i + 6 : NODES - 1));
        ins.nxt_lo = IA_W'($urandom_range(i + 1, i + 6 < int'(NODES) ? i + 6 : NODES - 1));
      end
      prog[i] = ins;
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < int'(NODES); i++) begin
      @(negedge clk);
      imem_we = 1'b1; imem_waddr = IA_W'(i); imem_wdata = prog[i];
    end
    @(negedge clk);
    imem_we = 1'b0;

    for (int t = 0; t < 600; t++) begin
      action_e ea; int en; int r; int cyc;
      hdr = {$urandom, $urandom, 4'($urandom), 8'($urandom), 16'($urandom), 16'($urandom)};
      r = (t % 10 == 0) ? $urandom_range(NODES - NTERM, NODES - 1)  // terminal root
                        : $urandom_range(0, NODES - 1);
      walk(hdr, r, ea, en);
      len_hist[en > 31 ? 31 : en]++;
      // start may be raised in the cycle done pulses (busy already low)
      checks++;
      if (busy) begin failures++; $display("FAIL busy before start"); end
      start = 1'b1; root = IA_W'(r);
      @(negedge clk);
      start = 1'b0; hdr = ~hdr;   // the engine must have latched the header
      cyc = 1;
      while (!done && cyc < 200) begin
        @(negedge clk); cyc++;
      end
      checks++;
      if (!done || action !== ea || int'(nsteps) != en || cyc != en + 1) begin
        failures++;
        $display("FAIL root=%0d action=%s/%s steps=%0d/%0d cycles=%0d/%0d",
                 r, action.name(), ea.name(), nsteps, en, cyc, en + 1);
      end
    end
    // path lengths: terminal roots and long walks must both have occurred
    checks++;
    if (len_hist[1] == 0 || len_hist[2] == 0 || len_hist[10] + len_hist[11] + len_hist[12] == 0) begin
      failures++;
      $display("FAIL path coverage");
    end
    $display("path length histogram (1..20):");
    for (int i = 1; i <= 20; i++) $write(" %0d", len_hist[i]);
    $display("");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
