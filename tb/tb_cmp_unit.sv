// tb_cmp_unit: self-checking test of the range comparator.
// For each header field, random headers are tested against random ranges,
// exact values and prefixes; the expected result is computed from the
// field taken directly from the header struct.
module tb_cmp_unit;
  import lup_pkg::*;

  hdr_t hdr;
  field_e field;
  logic [VAL_W-1:0] lo, hi;
  logic hit;
  int checks = 0, failures = 0;

  cmp_unit dut (.*);

  function automatic logic [VAL_W-1:0] pick(hdr_t h, field_e f);
    case (f)
      F_DADDR: return h.daddr;
      F_SADDR: return h.saddr;
      F_IIF:   return {28'd0, h.iif};
      F_PROTO: return {24'd0, h.proto};
      F_SPORT: return {16'd0, h.sport};
      F_DPORT: return {16'd0, h.dport};
      default: return '0;
    endcase
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nhit = 0;
    for (int i = 0; i < 6000; i++) begin
      logic [VAL_W-1:0] v, a, b;
      logic exp;
      int kind;
      hdr = {$urandom, $urandom, 4'($urandom), 8'($urandom), 16'($urandom), 16'($urandom)};
      field = field_e'(i % 6);
      v = pick(hdr, field);
      kind = $urandom_range(0, 3);
      case (kind)
        0: begin  // random range
          a = $urandom; b = $urandom;
          if (field != F_DADDR && field != F_SADDR) begin a = a & 32'hffff; b = b & 32'hffff; end
          lo = (a < b) ? a : b; hi = (a < b) ? b : a;
        end
        1: begin  // exact, hit or near miss
          lo = v + 32'($urandom_range(0, 1)); hi = lo;
        end
        2: begin  // prefix of random length around v
          int len;
          logic [VAL_W-1:0] m, base;
          len = $urandom_range(0, 32);
          m = (len == 0) ? '0 : ~((32'h1 << (32 - len)) - 1);
          base = ($urandom_range(0, 1) == 1) ? v : $urandom;
          lo = base & m; hi = (base & m) | ~m;
        end
        default: begin  // range with v on the edge
          lo = v; hi = v + 32'($urandom_range(0, 5));
          if ($urandom_range(0, 1) == 1) begin hi = v - 1; lo = v - 9; end
        end
      endcase
      exp = (v >= lo) && (v <= hi);
      #1;
      checks++;
      if (exp) nhit++;
      if (hit !== exp) begin
        failures++;
        $display("FAIL field=%s v=%h lo=%h hi=%h hit=%b", field.name(), v, lo, hi, hit);
      end
    end
    // both outcomes must have been exercised
    checks++;
    if (nhit < 500 || nhit > 5500) begin
      failures++;
      $display("FAIL poor coverage: %0d hits", nhit);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
