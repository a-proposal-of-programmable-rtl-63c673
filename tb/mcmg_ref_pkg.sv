// mcmg_ref_pkg: reference model of the MCMG logic-block LUT for the
// testbenches. It computes the expected LUT outputs from first principles
// (sub-table base address and local index per mode), written separately from
// the RTL's concatenated-index form.
package mcmg_ref_pkg;
  import mcmg_pkg::*;

  // Expected 3 outputs for one table, mode, plane select and input vector.
  function automatic logic [2:0] ref_lut(logic [63:0] bits, logic [2:0] mode,
                                         logic [2:0] ctx, logic [5:0] in);
    logic [2:0] o;
    int n, planes, plane, base, idx;
    o = 3'b000;
    case (mode)
      3'd0: begin  // three 2-LUTs, 4 bits each
        for (int j = 0; j < 3; j++) begin
          idx  = (in >> (2*j)) & 3;
          o[j] = bits[j*4 + idx];
        end
      end
      3'd1: begin  // two 3-LUTs, 8 bits each
        for (int j = 0; j < 2; j++) begin
          idx  = (in >> (3*j)) & 7;
          o[j] = bits[j*8 + idx];
        end
      end
      3'd2: o[0] = bits[in];
      3'd3, 3'd4, 3'd5: begin  // n-input LUT with 64 / 2^n planes
        n      = int'(mode);    // 3, 4, 5 inputs
        planes = 64 >> n;
        plane  = int'(ctx) % planes;
        base   = plane * (1 << n);
        idx    = int'(in) % (1 << n);
        o[0]   = bits[base + idx];
      end
      default: o = 3'b000;
    endcase
    return o;
  endfunction

  function automatic context_t rand_context();
    context_t c;
    c.bits   = {$urandom(), $urandom()};
    c.mode   = lut_mode_e'($urandom_range(0, 7));
    c.use_ff = 3'($urandom_range(0, 7));
    return c;
  endfunction
endpackage
