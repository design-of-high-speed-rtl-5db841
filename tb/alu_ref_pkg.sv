// alu_ref_pkg: reference model of the ALU operations for the testbenches.
// Written independently of the RTL: signed compares use $signed, rotates
// and leading zeros are computed bit by bit, subtraction is plain '-'.
package alu_ref_pkg;

  function automatic logic [31:0] rot_left(logic [31:0] v, int unsigned n);
    logic [31:0] r;
    for (int i = 0; i < 32; i++) r[(i + n) % 32] = v[i];
    return r;
  endfunction

  function automatic logic [31:0] count_lz(logic [31:0] v);
    int unsigned n = 0;
    for (int i = 31; i >= 0; i--) begin
      if (v[i]) break;
      n++;
    end
    return n;
  endfunction

  function automatic logic [31:0] ref_alu(logic [4:0] op, logic [31:0] a, logic [31:0] b);
    logic [63:0] p;
    logic [32:0] s33;
    int unsigned sh;
    sh = 32'(b[4:0]);
    p  = 64'(a) * 64'(b);
    s33 = 33'(a) + 33'(b);
    case (op)
      5'd0:  return a + b;
      5'd1:  return a - b;
      5'd2:  return b - a;
      5'd3:  return a + 1;
      5'd4:  return a - 1;
      5'd5:  return 32'd0 - a;
      5'd6:  return ($signed(a) < 0) ? 32'd0 - a : a;
      5'd7:  return s33[32:1];
      5'd8:  return p[31:0];
      5'd9:  return p[63:32];
      5'd10: return ($signed(a) < $signed(b)) ? 32'd1 : 32'd0;
      5'd11: return (a < b) ? 32'd1 : 32'd0;
      5'd12: return ($signed(a) < $signed(b)) ? a : b;
      5'd13: return ($signed(a) > $signed(b)) ? a : b;
      5'd14: return (a < b) ? a : b;
      5'd15: return (a > b) ? a : b;
      5'd16: return a & b;
      5'd17: return a | b;
      5'd18: return a ^ b;
      5'd19: return ~(a & b);
      5'd20: return ~(a | b);
      5'd21: return ~(a ^ b);
      5'd22: return ~a;
      5'd23: return a;
      5'd24: return a << sh;
      5'd25: return a >> sh;
      5'd26: return $signed(a) >>> sh;
      5'd27: return rot_left(a, sh);
      5'd28: return rot_left(a, (32 - sh) % 32);
      5'd29: return $countones(a);
      5'd30: return count_lz(a);
      default: return b;
    endcase
  endfunction

  // Operand values that hit the corner cases of every operation.
  function automatic logic [31:0] pick_operand(int unsigned r);
    case (r % 8)
      0: return 32'h0000_0000;
      1: return 32'hFFFF_FFFF;
      2: return 32'h8000_0000;
      3: return 32'h7FFF_FFFF;
      4: return 32'h0000_0001;
      default: return $urandom;
    endcase
  endfunction

endpackage
