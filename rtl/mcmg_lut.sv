// mcmg_lut: multi-context multi-grain 6-input 3-output look-up table.
//
// One 64-bit truth-table plane is read in one of six ways, chosen by the
// 3-bit mode of the active context:
//   (a) three 2-LUTs : LUT j uses lut_in[2j+1:2j], bits[4j+3:4j]    -> lut_out[j]
//   (b) two 3-LUTs   : LUT j uses lut_in[3j+2:3j], bits[8j+7:8j]    -> lut_out[j]
//   (c) one 6-LUT    : lut_in[5:0] indexes bits[63:0]               -> lut_out[0]
//   (d) 3-LUT x 8 planes: plane ctx_sel[2:0], bits[8p +: 8] by lut_in[2:0]
//   (e) 4-LUT x 4 planes: plane ctx_sel[1:0], bits[16p +: 16] by lut_in[3:0]
//   (f) 5-LUT x 2 planes: plane ctx_sel[0],   bits[32p +: 32] by lut_in[4:0]
// Modes (d)-(f) drive lut_out[0]. Outputs a mode does not use, and every
// output in the two reserved mode codes, are 0.
//
// Purely combinational. The six modes, the 6-input/3-output shape and the
// separate context-switch select follow the proposal; which input pins and
// table bits each sub-LUT uses, and the zero on unused outputs, are this
// design's choice. In every mode the output bit is the table bit whose index
// is the concatenation {plane, inputs}, so a 6-LUT table and a plane table
// share one addressing rule.
module mcmg_lut
  import mcmg_pkg::*;
(
  input  logic [LUT_BITS-1:0] cfg_bits,
  input  lut_mode_e           mode,
  input  logic [2:0]          ctx_sel,
  input  logic [K-1:0]        lut_in,
  output logic [NOUT-1:0]     lut_out
);

  always_comb begin
    lut_out = '0;
    unique case (mode)
      MODE_A_2LUT_X3: begin
        for (int j = 0; j < 3; j++)
          lut_out[j] = cfg_bits[4*j + int'(lut_in[2*j +: 2])];
      end
      MODE_B_3LUT_X2: begin
        for (int j = 0; j < 2; j++)
          lut_out[j] = cfg_bits[8*j + int'(lut_in[3*j +: 3])];
      end
      MODE_C_6LUT:    lut_out[0] = cfg_bits[lut_in];
      MODE_D_3LUT_P8: lut_out[0] = cfg_bits[{ctx_sel[2:0], lut_in[2:0]}];
      MODE_E_4LUT_P4: lut_out[0] = cfg_bits[{ctx_sel[1:0], lut_in[3:0]}];
      MODE_F_5LUT_P2: lut_out[0] = cfg_bits[{ctx_sel[0],   lut_in[4:0]}];
      default:        lut_out = '0;
    endcase
  end

endmodule
