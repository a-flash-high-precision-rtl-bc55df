`timescale 1ps / 1fs
// tdc_top: flash time-to-digital converter with a coarse counter, a four-phase
// interpolator and carry-chain fine interpolators.
//
// Three stages measure the interval between a START and a STOP edge. The coarse TDC
// counts whole periods of the 550 MHz clk0 (32-bit free-running counter sampled on
// both edges) and, with the phase state machine, the quarter of the period in which
// each edge fell; its result Nc[33:0] is the interval in quarter periods. Two fine
// TDCs, one for START and one for STOP, measure how long before the next quarter edge
// each hit arrived, in carry-mux delays tau: na and nb. The interval is
//     T_stop - T_start = Nc * T/4 + (na - nb) * tau        (T = clk0 period)
// and is computed by whoever reads the three numbers, as in the published design.
// The output register and the valid pulse are this design's: when the START capture
// reaches the clk0 domain, na is copied into a clk0 register (with the START count
// and quarter inside coarse_tdc); when the STOP capture arrives after a START, nc, na
// and nb are registered and valid is high for one clk0 cycle. A STOP without a
// preceding START is ignored.
//
// Interface: clk0, clk90, clk180, clk270 (DCM outputs), rst_n (power-up reset),
// start, stop -> nc, na, nb, valid.
// Timing: valid rises 3 to 4 clk0 periods after STOP. Each hit must stay high for more
// than one clock period and be low for one period before the next hit on the same
// input, and hits on one input must be 3 periods apart. A new START may follow the
// STOP by one clock period: the dead time between measurements is about one period.
module tdc_top #(
  parameter int unsigned COARSE_W = tdc_pkg::COARSE_W,
  parameter int unsigned TAPS     = tdc_pkg::TAPS,
  parameter int unsigned FINE_W   = tdc_pkg::FINE_W,
  parameter realtime     TAU_PS   = tdc_pkg::TAU_PS
) (
  input  logic                clk0,
  input  logic                clk90,
  input  logic                clk180,
  input  logic                clk270,
  input  logic                rst_n,
  input  logic                start,
  input  logic                stop,
  output logic [COARSE_W+1:0] nc,
  output logic [FINE_W-1:0]   na,
  output logic [FINE_W-1:0]   nb,
  output logic                valid
);
  logic [COARSE_W+1:0] nc_raw;
  logic [FINE_W-1:0]   na_raw, na_held, nb_raw;
  logic [1:0]          sel0_raw, sel1_raw;
  logic                start_seen, stop_seen, armed;

  coarse_tdc #(.COARSE_W(COARSE_W)) u_coarse (
    .clk0, .clk90, .clk180, .clk270, .rst_n, .start, .stop,
    .nc(nc_raw), .sel0(sel0_raw), .sel1(sel1_raw), .start_seen, .stop_seen
  );

  fine_tdc #(.TAPS(TAPS), .FINE_W(FINE_W), .TAU_PS(TAU_PS)) u_fine_a (
    .clk0, .clk90, .clk180, .clk270, .rst_n, .hit(start), .sel(sel0_raw), .n(na_raw)
  );
  fine_tdc #(.TAPS(TAPS), .FINE_W(FINE_W), .TAU_PS(TAU_PS)) u_fine_b (
    .clk0, .clk90, .clk180, .clk270, .rst_n, .hit(stop), .sel(sel1_raw), .n(nb_raw)
  );

  always_ff @(posedge clk0 or negedge rst_n) begin
    if (!rst_n) begin
      armed   <= 1'b0;
      valid   <= 1'b0;
      na_held <= '0;
      nc      <= '0;
      na      <= '0;
      nb      <= '0;
    end else begin
      valid <= 1'b0;
      if (start_seen) na_held <= na_raw;
      if (stop_seen && (armed || start_seen)) begin
        // start_seen in the same cycle means START and STOP of one short interval
        valid <= 1'b1;
        armed <= 1'b0;
        nc    <= nc_raw;
        na    <= start_seen ? na_raw : na_held;
        nb    <= nb_raw;
      end else if (start_seen) begin
        armed <= 1'b1;
      end
    end
  end
endmodule
