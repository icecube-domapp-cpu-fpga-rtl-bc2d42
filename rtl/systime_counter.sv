// systime_counter: the 48-bit DOM system time.
//
// The system time counts the 40 MHz system clock (25 ns per tick) from 0 at
// power up, as the interface specification states, and is the time base of
// every timestamp in the FPGA: event headers, calibration flash times and the
// supernova gate. Width and resolution follow the specification; the reset
// input standing in for "power up" is this design's choice.
//
// Interface: systime is registered, one increment per clock. tgl_5mhz is
// systime bit 2, a 5 MHz square wave derived from the 40 MHz clock (DOM
// status bit 30).
module systime_counter #(
  parameter int unsigned WIDTH = 48
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [WIDTH-1:0] systime,
  output logic             tgl_5mhz
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) systime <= '0;
    else        systime <= systime + 1'b1;

  assign tgl_5mhz = systime[2];
endmodule
