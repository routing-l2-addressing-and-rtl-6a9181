// tcam: ternary content addressable memory with first-match priority.
//
// Each of the ROWS rows stores a value, a care mask (1 = bit must match,
// 0 = don't care) and a valid flag. A search compares the key with every
// valid row in parallel and returns the lowest-index matching row, so the
// CAM acts as a "big case statement": rows are loaded in first-match order
// (longest destination prefixes first, then the filter blocks produced for
// each prefix), exactly as the RAF-to-LUP conversion emits them. Exact and
// prefix tests fit one row; a range test must be pre-expanded by the loader
// into a block of prefix rows.
//
// Interface:
//   write port  wr_en, wr_idx, wr_valid, wr_value, wr_care: one row per
//               clock; wr_valid=0 invalidates a row.
//   search port srch_en, srch_key: one search per clock (fully pipelined).
//   result      res_valid, res_hit, res_idx: registered, one cycle after
//               srch_en. res_hit=0 when no valid row matches.
// A search and a write in the same cycle see the old row contents.
// Reset clears all valid flags; values and masks are not reset.
// The parallel compare and priority encoder are this design's own (the
// simplest first-match structure); the architecture gives only the function.
module tcam #(
  parameter int unsigned ROWS = 512,
  parameter int unsigned W    = 76,
  localparam int unsigned IW  = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // row write
  input  logic          wr_en,
  input  logic [IW-1:0] wr_idx,
  input  logic          wr_valid,
  input  logic [W-1:0]  wr_value,
  input  logic [W-1:0]  wr_care,
  // search
  input  logic          srch_en,
  input  logic [W-1:0]  srch_key,
  output logic          res_valid,
  output logic          res_hit,
  output logic [IW-1:0] res_idx
);

  logic [W-1:0] value [ROWS];
  logic [W-1:0] care  [ROWS];
  logic [ROWS-1:0] valid;

  // Match lines.
  logic [ROWS-1:0] match;
  always_comb begin
    for (int unsigned r = 0; r < ROWS; r++) begin
      match[r] = valid[r] && (((srch_key ^ value[r]) & care[r]) == '0);
    end
  end

  // Priority encoder: lowest index wins. Scanning downwards leaves the
  // lowest matching index in first_idx.
  logic          any_hit;
  logic [IW-1:0] first_idx;
  always_comb begin
    any_hit   = |match;
    first_idx = '0;
    for (int r = int'(ROWS) - 1; r >= 0; r--) begin
      if (match[r]) first_idx = IW'(r);
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      value[wr_idx] <= wr_value;
      care[wr_idx]  <= wr_care;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid     <= '0;
      res_valid <= 1'b0;
      res_hit   <= 1'b0;
      res_idx   <= '0;
    end else begin
      if (wr_en) valid[wr_idx] <= wr_valid;
      res_valid <= srch_en;
      if (srch_en) begin
        res_hit <= any_hit;
        res_idx <= first_idx;
      end
    end
  end

endmodule
