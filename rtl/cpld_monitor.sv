// cpld_monitor: over-temperature protection of one plug-in module, part of
// the module CPLD's system-management duties.
//
// Every compute FPGA's die temperature (from its temperature diode, digitised
// to whole degrees Celsius outside this block) is compared each clock with
// SHUTDOWN_C. As soon as any FPGA reaches it, the module's DC/DC converters are
// switched off through 'power_en' and stay off (latched) until the controller
// clears the condition with 'clear' while all temperatures are below the limit
// again. The maximum allowed core temperature is 85 C; switching at 80 C keeps
// a margin to it. The block also reports the hottest temperature and a bitmap of
// FPGAs at or above the limit, for the monitoring bus.
//
// Timing: power_en falls on the clock after an over-temperature sample.
module cpld_monitor #(
  parameter int unsigned N_FPGAS    = 8,
  parameter int unsigned MAX_C      = 85,   // maximum core temperature
  parameter int unsigned MARGIN_C   = 5,    // switch off this far below it
  parameter int unsigned SHUTDOWN_C = MAX_C - MARGIN_C
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [7:0]         temp [N_FPGAS],  // degrees Celsius
  input  logic               clear,           // re-enable after a shutdown
  output logic               power_en,
  output logic               shutdown,        // latched over-temperature event
  output logic [N_FPGAS-1:0] hot,
  output logic [7:0]         temp_max
);
  always_comb begin
    temp_max = '0;
    for (int i = 0; i < N_FPGAS; i++) begin
      hot[i] = (temp[i] >= 8'(SHUTDOWN_C));
      if (temp[i] > temp_max) temp_max = temp[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          shutdown <= 1'b0;
    else if (|hot)       shutdown <= 1'b1;
    else if (clear)      shutdown <= 1'b0;
  end

  assign power_en = !shutdown;
endmodule
