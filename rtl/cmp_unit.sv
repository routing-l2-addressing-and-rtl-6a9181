// cmp_unit: evaluates one FDD variable of a comparison instruction.
//
// The instruction names a header field (the variable's class) and a closed
// range [lo, hi]. The selected field is zero-extended to VAL_W bits and the
// unit reports whether lo <= field <= hi. This one test form covers the
// variable kinds the filtering language uses: ranges ("dst port
// 1024-65535"), prefixes ("src addr 1.2.3.0/24" = 1.2.3.0 .. 1.2.3.255) and
// exact values (lo == hi). That instructions may test any header field
// follows the architecture; the range encoding is this design's choice.
// Purely combinational.
module cmp_unit
  import lup_pkg::*;
(
  input  hdr_t             hdr,
  input  field_e           field,
  input  logic [VAL_W-1:0] lo,
  input  logic [VAL_W-1:0] hi,
  output logic             hit
);

  logic [VAL_W-1:0] v;

  always_comb begin
    unique case (field)
      F_DADDR: v = VAL_W'(hdr.daddr);
      F_SADDR: v = VAL_W'(hdr.saddr);
      F_IIF:   v = VAL_W'(hdr.iif);
      F_PROTO: v = VAL_W'(hdr.proto);
      F_SPORT: v = VAL_W'(hdr.sport);
      F_DPORT: v = VAL_W'(hdr.dport);
      default: v = '0;
    endcase
    hit = (v >= lo) && (v <= hi);
  end

endmodule
