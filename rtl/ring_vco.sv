`timescale 1ps/1ps
// Behavioural model (not synthesizable) of the ground-controlled ring VCO.
//
// The real part is a ring of 16 ground-controlled inverter delay cells whose
// first stage is a NAND gate, so that the ring only oscillates while `en` is
// high. The control voltage lifts the source of the NMOS devices; the
// oscillation frequency falls linearly from F0_HZ at 0 V to F1_HZ at the top of
// the range (VFS_UV microvolts). Both end points are the characterised values
// of this VCO (39.52 MHz and 26.99 MHz over 0..0.1 V).
//
// Model: the output toggles every half period. When `en` falls the output
// holds its level and the elapsed fraction of the current half period is kept,
// so the phase is resumed, not lost, when `en` rises again. This phase memory
// is what gives the converter its first-order noise shaping. The control code
// is read at the start of each half period. Jitter and nonlinearity are not
// modelled.
//
// Ports: en (NAND start input), vctrl_uv (control voltage in microvolts,
// clipped to VFS_UV), vco_out (buffered ring output).
module ring_vco #(
  parameter real         F0_HZ  = 39.52e6,
  parameter real         F1_HZ  = 26.99e6,
  parameter int unsigned VFS_UV = adc_pkg::VFS_UV,
  parameter int unsigned VIN_W  = adc_pkg::VIN_W
) (
  input  logic             en,
  input  logic [VIN_W-1:0] vctrl_uv,
  output logic             vco_out
);
  // Half period in picoseconds for a given control code.
  function automatic real half_period_ps(input logic [VIN_W-1:0] v);
    real vr, f;
    vr = (32'(v) > VFS_UV) ? real'(VFS_UV) : real'(v);
    f  = F0_HZ + (F1_HZ - F0_HZ) * vr / real'(VFS_UV);
    return 0.5e12 / f;
  endfunction

  real     frac;      // fraction of the current half period already run
  real     half_ps;
  realtime on_acc;    // total time spent enabled before on_since
  realtime on_since;  // time of the last rising edge of en
  realtime start_on;
  logic    en_seen;   // en as last seen by the bookkeeping below

  // Total enabled time up to now.
  function automatic realtime on_time();
    return on_acc + (en_seen ? ($realtime - on_since) : 0.0);
  endfunction

  initial begin
    on_acc   = 0.0;
    on_since = 0.0;
    en_seen  = 1'b0;
  end

  // The bookkeeping keeps its own copy of en, so the result of on_time() does
  // not depend on whether this block or the loop below wakes first on an edge.
  always @(en) begin
    if (en && !en_seen)      on_since = $realtime;
    else if (!en && en_seen) on_acc   = on_acc + ($realtime - on_since);
    en_seen = en;
  end

  // Wait out the rest of the half period; credit only the time en was high.
  // If en dropped meanwhile, wait for it to return and finish the remainder.
  initial begin
    vco_out = 1'b0;
    frac    = 0.0;
    forever begin
      if (!en) @(posedge en);
      half_ps  = half_period_ps(vctrl_uv);
      start_on = on_time();
      #((1.0 - frac) * half_ps);
      frac = frac + (on_time() - start_on) / half_ps;
      if ((1.0 - frac) * half_ps < 0.5) begin
        vco_out = ~vco_out;
        frac    = 0.0;
      end
    end
  end
endmodule
