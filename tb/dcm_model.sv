`timescale 1ps / 1fs
// dcm_model: behavioural model of the FPGA clock manager used by the testbenches.
//
// Produces four copies of the input clock shifted by 0, 90, 180 and 270 degrees
// (a quarter period each), as the device's clock manager does for the TDC. clk0 is
// the input itself (ideal deskew), clk90 is the input delayed by a quarter period,
// and clk180/clk270 are the complements of clk0/clk90 (a 50 % duty cycle is
// assumed). Not synthesizable; delays only.
module dcm_model #(
  parameter realtime PERIOD_PS = 1818.0
) (
  input  logic clkin,
  output logic clk0,
  output logic clk90,
  output logic clk180,
  output logic clk270
);
  assign clk0 = clkin;
  always begin
    clk90 <= #(PERIOD_PS / 4.0) clkin;
    @(clkin);
  end
  assign clk180 = ~clk0;
  assign clk270 = ~clk90;
endmodule
