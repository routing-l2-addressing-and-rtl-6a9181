// lup: Lookup Processor, the packet classification engine of the router
// accelerator.
//
// Routing, L3-to-L2 address translation (ARP) and packet filtering are
// resolved in a single run. The host compiles them into a Routing-ARP-
// Filtering structure and loads it into three memories:
//   * the ternary first-match CAM (tcam), one row per destination prefix and
//     CAMList field combination, rows in first-match order; the key is
//     {daddr, saddr, iif, proto};
//   * the result memory, one cam_res_t per CAM row: the next-hop MAC and
//     interface, or the SW symbol (packet must go to the host), and the
//     instruction address of the FDD that finishes the filter for that row;
//   * the instruction SRAM inside fdd_engine, holding the FDD nodes as
//     comparison instructions.
// A lookup searches the CAM, reads the row's result and, unless it is SW,
// runs the comparison instructions from the row's FDD root to a terminal.
// The answer is ACT_FORWARD (to out_mac / out_oif), ACT_DROP or ACT_HOST.
// A CAM miss also gives ACT_HOST; the loaded table always has a default
// row, so a miss only happens on an incompletely loaded table.
//
// Interface: in_valid/in_ready take one header; one lookup is in flight at
// a time. out_valid/out_ready hand over the result, held stable until taken.
// The three write ports may be used at any time, but the host should only
// change a structure while no lookup is in flight.
//
// Timing: counting the clock edge that accepts the header (in_valid &&
// in_ready) as edge 0, out_valid rises after edge 1 on a CAM miss, after
// edge 2 for an SW row and after edge N+3 for a filtered row whose FDD path
// has N nodes (N-1 tests plus the terminal). in_ready rises again after the
// edge on which the result is taken.
//
// The split into CAM, attached results and SRAM instructions, the SW
// outcome and the CAMList {src addr, src iface, proto} follow the
// architecture. The sequential one-lookup-at-a-time control, the miss
// handling, the handshakes and all sizes are this design's choices.
module lup
  import lup_pkg::*;
#(
  parameter int unsigned CAM_ROWS   = 512,
  parameter int unsigned IMEM_DEPTH = 1024,
  localparam int unsigned RW        = (CAM_ROWS > 1) ? $clog2(CAM_ROWS) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // CAM row load
  input  logic            cam_we,
  input  logic [RW-1:0]   cam_widx,
  input  logic            cam_wvalid,
  input  key_t            cam_wvalue,
  input  key_t            cam_wcare,
  // CAM result memory load
  input  logic            res_we,
  input  logic [RW-1:0]   res_widx,
  input  cam_res_t        res_wdata,
  // instruction SRAM load
  input  logic            imem_we,
  input  logic [IA_W-1:0] imem_waddr,
  input  instr_t          imem_wdata,
  // header in
  input  logic            in_valid,
  output logic            in_ready,
  input  hdr_t            in_hdr,
  // classification result out
  output logic            out_valid,
  input  logic            out_ready,
  output action_e         out_action,
  output logic [MAC_W-1:0] out_mac,
  output logic [IF_W-1:0] out_oif,
  output logic            out_hit,    // a CAM row matched
  output logic [RW-1:0]   out_row,    // the first matching CAM row
  output logic [IA_W:0]   out_steps   // FDD nodes evaluated (0 if none)
);

  typedef enum logic [2:0] {S_IDLE, S_CAM, S_RES, S_FDD, S_OUT} state_e;
  state_e state;

  hdr_t hdr_q;

  // CAM
  logic          cam_res_valid, cam_hit;
  logic [RW-1:0] cam_idx;

  tcam #(.ROWS(CAM_ROWS), .W(KEY_W)) u_cam (
    .clk       (clk),
    .rst_n     (rst_n),
    .wr_en     (cam_we),
    .wr_idx    (cam_widx),
    .wr_valid  (cam_wvalid),
    .wr_value  (cam_wvalue),
    .wr_care   (cam_wcare),
    .srch_en   (in_valid && in_ready),
    .srch_key  (make_key(in_hdr)),
    .res_valid (cam_res_valid),
    .res_hit   (cam_hit),
    .res_idx   (cam_idx)
  );

  // Result memory attached to the CAM rows
  logic [RES_W-1:0] res_word;
  cam_res_t         res;

  sram_1r1w #(.DEPTH(CAM_ROWS), .WIDTH(RES_W)) u_res (
    .clk   (clk),
    .we    (res_we),
    .waddr (res_widx),
    .wdata (res_wdata),
    .re    (state == S_CAM && cam_hit),
    .raddr (cam_idx),
    .rdata (res_word)
  );

  assign res = cam_res_t'(res_word);

  // Comparison instructions
  logic          eng_start, eng_busy, eng_done;
  action_e       eng_action;
  logic [IA_W:0] eng_steps;

  assign eng_start = (state == S_RES) && !res.sw;

  fdd_engine #(.IMEM_DEPTH(IMEM_DEPTH)) u_eng (
    .clk        (clk),
    .rst_n      (rst_n),
    .imem_we    (imem_we),
    .imem_waddr (imem_waddr),
    .imem_wdata (imem_wdata),
    .start      (eng_start),
    .root       (res.root),
    .hdr        (hdr_q),
    .busy       (eng_busy),
    .done       (eng_done),
    .action     (eng_action),
    .nsteps     (eng_steps)
  );

  assign in_ready  = (state == S_IDLE);
  assign out_valid = (state == S_OUT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      hdr_q      <= '0;
      out_action <= ACT_HOST;
      out_mac    <= '0;
      out_oif    <= '0;
      out_hit    <= 1'b0;
      out_row    <= '0;
      out_steps  <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (in_valid) begin
            hdr_q <= in_hdr;
            state <= S_CAM;
          end
        end
        S_CAM: begin
          out_hit   <= cam_hit;
          out_row   <= cam_idx;
          out_steps <= '0;
          if (cam_hit) begin
            state <= S_RES;
          end else begin
            out_action <= ACT_HOST;
            out_mac    <= '0;
            out_oif    <= '0;
            state      <= S_OUT;
          end
        end
        S_RES: begin
          out_mac <= res.mac;
          out_oif <= res.oif;
          if (res.sw) begin
            out_action <= ACT_HOST;
            state      <= S_OUT;
          end else begin
            state <= S_FDD;
          end
        end
        S_FDD: begin
          if (eng_done) begin
            out_action <= eng_action;
            out_steps  <= eng_steps;
            state      <= S_OUT;
          end
        end
        S_OUT: begin
          if (out_ready) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

`ifndef SYNTHESIS
  // Input handshake: a header, once offered, stays offered and unchanged
  // until it is accepted.
  a_in_hold: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid && !in_ready |=> in_valid && $stable(in_hdr));
  // The CAM answers exactly one cycle after a search.
  a_cam_timing: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_CAM) |-> cam_res_valid);
  // The engine is only started while idle.
  a_eng_start: assert property (@(posedge clk) disable iff (!rst_n)
    eng_start |-> !eng_busy);
`endif

endmodule
