`timescale 1ps / 1fs
// time_register: the START (or STOP) register of the coarse TDC.
//
// On the rising edge of the hit the register takes the current coarse counter value:
// the hit itself is the register's clock, so the value is the count of the clk0
// period in which the hit arrived. Each capture flips a toggle flag; a two-flop
// synchroniser plus an edge detector on clk0 turn the flip into a one-cycle 'seen'
// pulse for the clk0 domain. At the end of that cycle the value is copied into 'held',
// a clk0-domain register, after which the hit-clocked register is free for the next
// hit. Sampling on the hit follows the published design; the toggle-flag handshake
// and the clk0 copy are this design's choices.
//
// Interface: hit, count[W-1:0] -> value[W-1:0] (hit domain), held[W-1:0] (clk0
// domain); seen is a clk0 pulse.
// Timing: value is valid just after the hit edge and is stable while seen is high;
// seen is high during the 3rd clk0 period after the hit at the latest (2 to 3 clk0
// periods); held follows on the edge that ends seen. Hits must be 3 clock periods
// apart, low for one clock period between them, and must not coincide with a clk0
// edge (the counter is binary, not Gray coded).
module time_register #(
  parameter int unsigned W = tdc_pkg::COARSE_W
) (
  input  logic         clk0,
  input  logic         rst_n,
  input  logic         hit,
  input  logic [W-1:0] count,
  output logic [W-1:0] value,
  output logic [W-1:0] held,
  output logic         seen
);
  logic       flag;
  logic [2:0] sync;

  always_ff @(posedge hit or negedge rst_n) begin
    if (!rst_n) begin
      value <= '0;
      flag  <= 1'b0;
    end else begin
      value <= count;
      flag  <= ~flag;
    end
  end

  always_ff @(posedge clk0 or negedge rst_n) begin
    if (!rst_n) sync <= '0;
    else        sync <= {sync[1:0], flag};
  end

  assign seen = sync[2] ^ sync[1];

  always_ff @(posedge clk0 or negedge rst_n) begin
    if (!rst_n)    held <= '0;
    else if (seen) held <= value;
  end
endmodule
