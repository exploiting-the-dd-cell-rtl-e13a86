// dd_cell: BEHAVIOURAL MODEL (not synthesizable) of one Delay-Difference cell.
//
// The real cell is two D-latches with asynchronous reset (L1, L2) and two
// inverters closed in a loop: IV1 -> L1 -> IV2 -> L2 -> back to IV1, both
// latch gates driven by S and both resets by R. On an FPGA it fills half a
// Slice: two flip-flops configured as latches and two LUTs configured as NOT
// gates, with hand-matched routing. Its behaviour is a timing race, so it
// cannot be simulated as zero-delay logic; this model reproduces it with
// delays instead.
//
// Excitation (as the cell is meant to be used):
//   R=1, S=0  reset: both latch outputs 0, both latch inputs 1.
//   R=0, S=1  start: the latches turn transparent and a race begins. The
//             loop oscillates with a duty cycle that moves by dT/T every
//             period (dT = delay difference of the two branches, T = loop
//             period) until it reaches 0 or 1 and the cell settles.
//   R=0, S=0  sample: the latches hold whatever the output was.
// Sampled during the oscillation (short S pulse) the bit is random; sampled
// after settling (long S pulse) it is sign(dT), the PUF bit: q = 1 for dT>0.
//
// Model: at time 0 the cell draws its static mismatch
//   dT_cell = DT_NOM_PS + MISMATCH_SIGMA_PS * N(0,1)
// (DT_NOM_PS is the routing mismatch of the placed macro). Every race draws
// dT = dT_cell + JITTER_PS * N(0,1), constant for that race, so the spread of
// the duty cycle grows linearly with the number of periods M, and in period M
// the output is high for DC(M) = 1/2 + M*dT/T of the period. Each period length
// also gets PERIOD_JITTER_PS of white jitter, which makes the phase of the
// oscillation at the sampling instant drift at random: sampled in the middle of
// the transient, the cell returns 1 with a probability close to DC(M). The
// normal deviates come from a per-instance xorshift generator seeded by SEED.
//
// The document gives the cell structure, the excitation sequence, the
// duty-cycle law and the reading of a sample as a draw with probability DC;
// the oscillation period, the mismatch and jitter sizes are
// this model's own choice, picked so that the cells settle after roughly
// 10-30 cycles of the 450 MHz clock as the measured optimum sampling time
// of 16-17 cycles implies. The model assumes S stays low for longer than
// half a loop period between races. The latch that lint reports on `q` is
// intended: it is the cell's output latch L2.
`timescale 1ps/1fs
module dd_cell #(
  parameter int unsigned SEED              = 1,
  parameter real         DT_NOM_PS         = 0.0,
  parameter real         MISMATCH_SIGMA_PS = 25.0,
  parameter real         JITTER_PS         = 1.5,
  parameter real         PERIOD_JITTER_PS  = 60.0,
  parameter real         T_OSC_PS          = 1000.0
) (
  input  logic r,   // asynchronous reset of L1 and L2 (active high)
  input  logic s,   // latch gate: 1 = transparent (race), 0 = hold
  output logic q    // Q of L2
);

  logic        osc;      // L2 input side of the loop while transparent
  logic        armed;    // a reset has happened since the last race
  int unsigned rng;
  real         dt_cell;
  real         dt_run;
  real         dc;
  real         per;
  int          m;

  function automatic int unsigned xorshift(input int unsigned x);
    int unsigned y;
    y = x;
    y = y ^ (y << 13);
    y = y ^ (y >> 17);
    y = y ^ (y << 5);
    return y;
  endfunction

  // Approximate standard normal: sum of 12 uniforms minus 6.
  task automatic gauss(output real g);
    real acc;
    acc = 0.0;
    for (int i = 0; i < 12; i++) begin
      rng = xorshift(rng);
      acc = acc + real'(rng) / 4294967296.0;
    end
    g = acc - 6.0;
  endtask

  initial begin
    real g;
    rng = (SEED * 32'h9E3779B9) ^ 32'h5BD1E995;
    if (rng == 0) rng = 32'h1234_5678;
    for (int i = 0; i < 4; i++) rng = xorshift(rng);
    gauss(g);
    dt_cell = DT_NOM_PS + MISMATCH_SIGMA_PS * g;
    osc   = 1'b0;
    armed = r;
    forever begin
      @(s or r);
      if (r) begin
        osc   = 1'b0;
        armed = 1'b1;
      end else if (s && armed) begin
        armed = 1'b0;
        gauss(g);
        dt_run = dt_cell + JITTER_PS * g;
        m = 0;
        while (s) begin
          m++;
          dc = 0.5 + real'(m) * dt_run / T_OSC_PS;
          if (dc >= 1.0) begin
            osc = 1'b1;
            break;
          end
          if (dc <= 0.0) begin
            osc = 1'b0;
            break;
          end
          gauss(g);
          per = T_OSC_PS + PERIOD_JITTER_PS * g;
          osc = 1'b1;
          #(dc * per);
          if (!s) break;
          osc = 1'b0;
          #((1.0 - dc) * per);
        end
        if (r) begin
          osc   = 1'b0;
          armed = 1'b1;
        end
      end
    end
  end

  // L2: transparent while S is high, cleared by R.
  always @(r or s or osc) begin
    if (r)      q = 1'b0;
    else if (s) q = osc;
  end

endmodule
