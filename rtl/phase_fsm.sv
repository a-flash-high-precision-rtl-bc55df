`timescale 1ps / 1fs
// phase_fsm: the state machine that makes the first phase interpolation.
//
// The state counter produces a 4-bit code that changes every quarter of the clk0
// period. The Phase Start and Phase Stop registers sample it on the START and STOP
// edges; two encoders turn the samples into the quarters sel0 (START) and sel1 (STOP),
// which also choose the delay line of each fine TDC; a 2-bit subtractor gives
// Nc[1:0] = sel1 - sel0 and a borrow for the coarse subtractor. The block structure is
// the published one; the borrow output is this design's addition, and so is the clk0
// copy of sel0 taken when start_seen pulses: the subtraction uses that copy, so a new
// START may arrive before the STOP of the previous pair has been read.
//
// Interface: clk0..clk270, rst_n, start, stop, start_seen (clk0 pulse from the coarse
// START register) -> sel0, sel1 (hit domain, to the fine TDCs), nc_lo, borrow.
// Timing: sel0/sel1 are valid just after their hit edge and held until the next one.
// nc_lo and borrow are valid while the STOP register's seen pulse is high; in that
// cycle the START quarter is sel0 itself if start_seen is high too (same pair), and
// the copy otherwise.
module phase_fsm (
  input  logic       clk0,
  input  logic       clk90,
  input  logic       clk180,
  input  logic       clk270,
  input  logic       rst_n,
  input  logic       start,
  input  logic       stop,
  input  logic       start_seen,
  output logic [1:0] sel0,
  output logic [1:0] sel1,
  output logic [1:0] nc_lo,
  output logic       borrow
);
  logic [3:0] ph_out, ph_start, ph_stop;
  logic       bad0, bad1;
  logic [1:0] sel0_held, sel0_pair;

  state_counter u_state (
    .clk0, .clk90, .clk180, .clk270, .rst_n, .ph_out
  );

  phase_register u_ph_start (.rst_n, .hit(start), .ph_out, .ph(ph_start));
  phase_register u_ph_stop  (.rst_n, .hit(stop),  .ph_out, .ph(ph_stop));

  phase_encoder u_enc0 (.ph(ph_start), .sel(sel0), .bad(bad0));
  phase_encoder u_enc1 (.ph(ph_stop),  .sel(sel1), .bad(bad1));

  always_ff @(posedge clk0 or negedge rst_n) begin
    if (!rst_n)          sel0_held <= '0;
    else if (start_seen) sel0_held <= sel0;
  end

  assign sel0_pair = start_seen ? sel0 : sel0_held;

  subtractor #(.W(2)) u_sub (
    .a(sel1), .b(sel0_pair), .bin(1'b0), .diff(nc_lo), .bout(borrow)
  );

  // A captured code must lie on the state-counter sequence once the counter has run
  // (settle is cleared by the reset, which keeps the check quiet until then).
  property p_code_ok(logic bad);
    @(posedge clk0) !bad;
  endproperty
  logic [2:0] settle;
  always_ff @(posedge clk0 or negedge rst_n) begin
    if (!rst_n)         settle <= '0;
    else if (!(&settle)) settle <= settle + 1'b1;
  end
  a_start_code: assert property (p_code_ok(bad0 && (&settle) && ph_start != 4'b0000)) else $display("bad start code %b at %t", ph_start, $realtime);
  a_stop_code:  assert property (p_code_ok(bad1 && (&settle) && ph_stop  != 4'b0000)) else $display("bad stop code %b at %t", ph_stop, $realtime);
endmodule
