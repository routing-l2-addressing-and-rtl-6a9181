// fdd_engine: executes the comparison instructions that finish a lookup.
//
// The filter left over for a CAM row is a decision diagram (FDD) whose nodes
// are stored as instructions in the instruction SRAM (one instr_t per word,
// see lup_pkg). An inner node (OP_TEST) tests one variable on the latched
// header with cmp_unit and jumps to nxt_hi when it holds or to nxt_lo when
// it does not; a terminal node (OP_TERM) carries the filter action. The
// engine starts at the root address supplied by the CAM result and follows
// the diagram until it reaches a terminal.
//
// Timing: start is accepted when busy=0. The root is read in the start
// cycle; from then on one node is evaluated per clock, the read of the
// successor being issued in the same cycle the node is evaluated. For a path
// of N nodes (N-1 tests plus the terminal) done pulses for one cycle N+1
// clocks after the start cycle, with action and nsteps (= N) valid while
// done=1 and held until the next lookup ends. busy is high from the cycle
// after start until the terminal has been evaluated.
//
// The program must be a DAG, as an FDD is; a cyclic program never ends.
// That the tests run from SRAM and each CAM row jumps to the root of its
// FDD follows the architecture; the instruction format, the one-node-per-
// clock sequencing and the handshake are this design's choices.
module fdd_engine
  import lup_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 1024
) (
  input  logic            clk,
  input  logic            rst_n,
  // instruction SRAM load port
  input  logic            imem_we,
  input  logic [IA_W-1:0] imem_waddr,
  input  instr_t          imem_wdata,
  // lookup
  input  logic            start,
  input  logic [IA_W-1:0] root,
  input  hdr_t            hdr,
  output logic            busy,
  output logic            done,
  output action_e         action,
  output logic [IA_W:0]   nsteps
);

  localparam int unsigned MAW = (IMEM_DEPTH > 1) ? $clog2(IMEM_DEPTH) : 1;

  typedef enum logic {S_IDLE, S_RUN} state_e;
  state_e state;

  hdr_t            hdr_q;
  logic            re;
  logic [IA_W-1:0] raddr;
  logic [INSTR_W-1:0] rword;
  instr_t          ins;
  logic            test_hit;
  logic [IA_W:0]   steps;

  sram_1r1w #(.DEPTH(IMEM_DEPTH), .WIDTH(INSTR_W)) u_imem (
    .clk   (clk),
    .we    (imem_we),
    .waddr (imem_waddr[MAW-1:0]),
    .wdata (imem_wdata),
    .re    (re),
    .raddr (raddr[MAW-1:0]),
    .rdata (rword)
  );

  assign ins = instr_t'(rword);

  cmp_unit u_cmp (
    .hdr   (hdr_q),
    .field (ins.field),
    .lo    (ins.lo),
    .hi    (ins.hi),
    .hit   (test_hit)
  );

  assign busy = (state == S_RUN);

  // Next instruction fetch.
  always_comb begin
    re    = 1'b0;
    raddr = root;
    if (state == S_IDLE) begin
      re    = start;
      raddr = root;
    end else if (ins.op == OP_TEST) begin
      re    = 1'b1;
      raddr = test_hit ? ins.nxt_hi : ins.nxt_lo;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      hdr_q  <= '0;
      steps  <= '0;
      done   <= 1'b0;
      action <= ACT_HOST;
      nsteps <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            hdr_q <= hdr;
            steps <= '0;
            state <= S_RUN;
          end
        end
        S_RUN: begin
          steps <= steps + 1'b1;
          if (ins.op == OP_TERM) begin
            done   <= 1'b1;
            action <= ins.act;
            nsteps <= steps + 1'b1;
            state  <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

`ifndef SYNTHESIS
  // The root and every successor must lie inside the instruction SRAM.
  a_fetch_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    re |-> (int'(raddr) < int'(IMEM_DEPTH)));
`endif

endmodule
