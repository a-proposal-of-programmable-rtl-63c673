// cfg_ctrl: control logic of the MCMG-LUT.
//
// Holds the active context: the 64 truth-table bits the LUT reads, the 3 mode
// bits and the per-output register selects. When load is high at a rising
// clock edge, the context in CDC slot load_addr replaces the active one, so a
// full reconfiguration of the LUT takes one clock cycle. The CDC is read
// combinationally through cdc_rd_addr/cdc_rd_data. loaded pulses for one
// cycle after each load, and active_slot tells which slot is active.
// Assertions check that a load names an existing slot and that loaded
// follows every load.
//
// Reset (synchronous, active high) clears the active context to all zeros:
// mode (a) with an all-zero table and combinational outputs, so the logic
// block drives 0 until a context is loaded.
//
// The proposal names this control logic and the three mode bits but leaves
// the way a context is swapped in open; the one-cycle parallel load is this
// design's choice.
module cfg_ctrl
  import mcmg_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          load,
  input  logic [AW-1:0] load_addr,
  output logic [AW-1:0] cdc_rd_addr,
  input  context_t      cdc_rd_data,
  output context_t      active,
  output logic [AW-1:0] active_slot,
  output logic          loaded
);

  assign cdc_rd_addr = load_addr;

  // A load must name an existing cache slot.
  a_load_in_range: assert property (@(posedge clk) disable iff (rst)
                                    load |-> (int'(load_addr) < DEPTH))
    else $error("cfg_ctrl: load of slot %0d of %0d", load_addr, DEPTH);

  // loaded follows every load by exactly one cycle.
  a_loaded_pulse: assert property (@(posedge clk) disable iff (rst)
                                   load |=> loaded);

  always_ff @(posedge clk) begin
    if (rst) begin
      active      <= '0;
      active_slot <= '0;
      loaded      <= 1'b0;
    end else begin
      loaded <= load;
      if (load) begin
        active      <= cdc_rd_data;
        active_slot <= load_addr;
      end
    end
  end

endmodule
