// rc_logic_block: logic block for reconfigurable computing with a
// configuration data cache (CDC) and a multi-context multi-grain LUT.
//
// Structure:  cdc --(context)--> cfg_ctrl --(active context)--> mcmg_lut
//             --> lb_out_stage --> lb_out
// The CDC holds CDC_DEPTH contexts. New contexts are written through the
// CDC's own data line (cdc_wr_*) at any time, also while the LUT is working.
// ctx_load copies CDC slot ctx_load_addr into the active context at the next
// clock edge, reconfiguring the whole LUT in one cycle. Within the active
// context, modes (d)-(f) hold 8, 4 or 2 planes that ctx_sel switches between
// with no clock at all. Each of the 3 outputs is registered or combinational
// as the active context says.
//
// Ports: lut_in/lb_out are the logic connections to the routing tracks (the
// tracks themselves are not part of this block). active_mode and active_slot
// report the active context; ctx_loaded pulses for one cycle after each
// context load. All state changes on the rising edge of clk;
// rst is synchronous and active high.
//
// The partitioning into CDC, LUT and flip-flops, the 6-input 3-output LUT with
// six modes and the 1,024-bit (16-context) CDC follow the proposal. The context
// load protocol, the output-select bits and the reset behaviour are this
// design's own.
module rc_logic_block
  import mcmg_pkg::*;
#(
  parameter int unsigned CDC_DEPTH = 16,
  localparam int unsigned AW       = (CDC_DEPTH > 1) ? $clog2(CDC_DEPTH) : 1
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [K-1:0]    lut_in,
  input  logic [2:0]      ctx_sel,
  input  logic            cdc_wr_en,
  input  logic [AW-1:0]   cdc_wr_addr,
  input  context_t        cdc_wr_data,
  input  logic            ctx_load,
  input  logic [AW-1:0]   ctx_load_addr,
  output logic [NOUT-1:0] lb_out,
  output lut_mode_e       active_mode,
  output logic [AW-1:0]   active_slot,
  output logic            ctx_loaded
);

  logic [AW-1:0]   cdc_rd_addr;
  context_t        cdc_rd_data;
  context_t        active;
  logic [NOUT-1:0] lut_out;

  cdc #(.DEPTH(CDC_DEPTH)) u_cdc (
    .clk     (clk),
    .wr_en   (cdc_wr_en),
    .wr_addr (cdc_wr_addr),
    .wr_data (cdc_wr_data),
    .rd_addr (cdc_rd_addr),
    .rd_data (cdc_rd_data)
  );

  cfg_ctrl #(.DEPTH(CDC_DEPTH)) u_ctrl (
    .clk         (clk),
    .rst         (rst),
    .load        (ctx_load),
    .load_addr   (ctx_load_addr),
    .cdc_rd_addr (cdc_rd_addr),
    .cdc_rd_data (cdc_rd_data),
    .active      (active),
    .active_slot (active_slot),
    .loaded      (ctx_loaded)
  );

  mcmg_lut u_lut (
    .cfg_bits (active.bits),
    .mode     (active.mode),
    .ctx_sel  (ctx_sel),
    .lut_in   (lut_in),
    .lut_out  (lut_out)
  );

  lb_out_stage #(.NOUT(NOUT)) u_out (
    .clk    (clk),
    .rst    (rst),
    .d      (lut_out),
    .use_ff (active.use_ff),
    .q      (lb_out)
  );

  assign active_mode = active.mode;

endmodule
