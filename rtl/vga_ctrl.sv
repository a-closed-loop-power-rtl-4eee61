// vga_ctrl: variable gain amplifier (VGA) controller of one transmitting radio
// hub.
//
// The controller holds a small lookup table with one 3-bit power step per
// destination radio hub. While the network runs (update low) the entry
// selected by dst_addr is read combinationally and drives the power amplifier
// through pwr_step, so every packet leaves with the power level calibrated for
// its receiver. During the reconfiguration state the power manager raises
// update; at the next clock edge the entry selected by dst_addr is then moved
// one step up (updown = 1) or one step down (updown = 0). The step saturates
// at 0 and at 2**PSTEP_W-1. On reset every entry holds INIT_STEP, the highest
// power step, so that transmission starts reliable and the loop lowers power
// from there.
//
// Interface and timing: pwr_step follows dst_addr in the same cycle; an update
// takes effect one clock edge after update is sampled high. en gates both the
// update and pa_on (pa_on = en & ~update: the PA is not driven while the
// table is being rewritten).
//
// Following the design: the per-destination table of 3-bit codes, the
// UPDATE / UPDOWN / DST_ADDR controls and the start at maximum power. This
// design's own choices: saturation at the ends of the range, the meaning of
// EN, and the synchronous active-low reset.
module vga_ctrl
  import winoc_pm_pkg::*;
#(
  parameter int unsigned N_HUBS    = 8,
  parameter int unsigned INIT_STEP = MAX_STEP,
  localparam int unsigned AW       = (N_HUBS > 1) ? $clog2(N_HUBS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic               update,
  input  logic               updown,
  input  logic [AW-1:0]      dst_addr,
  output logic               pa_on,
  output logic [PSTEP_W-1:0] pwr_step
);

  logic [PSTEP_W-1:0] lut [N_HUBS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N_HUBS; i++) lut[i] <= PSTEP_W'(INIT_STEP);
    end else if (en && update && (int'(dst_addr) < N_HUBS)) begin
      if (updown) begin
        if (lut[dst_addr] != PSTEP_W'(MAX_STEP)) lut[dst_addr] <= lut[dst_addr] + 1'b1;
      end else begin
        if (lut[dst_addr] != '0) lut[dst_addr] <= lut[dst_addr] - 1'b1;
      end
    end
  end

  always_comb begin
    pwr_step = '0;
    if (int'(dst_addr) < N_HUBS) pwr_step = lut[dst_addr];
  end

  assign pa_on = en & ~update;

endmodule
