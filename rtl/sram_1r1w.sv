// sram_1r1w: synchronous single-port-read, single-port-write memory.
//
// Used twice in the Lookup Processor: as the result memory attached to the
// CAM rows (one cam_res_t per row) and as the instruction SRAM holding the
// comparison instructions (one FDD node per word). Both are loaded by the
// host through the write port and read by the lookup datapath.
//
// Timing: a write with we=1 takes effect at the clock edge. A read with
// re=1 presents mem[raddr] on rdata after the next clock edge; rdata holds
// its value while re=0. A read of the address written in the same cycle
// returns the old word (read-before-write). Contents are not reset; the
// host must write every word that can be read. The memory organisation is
// this design's choice; only the role of each memory is given by the
// architecture.
module sram_1r1w #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
