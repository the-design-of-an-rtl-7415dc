// sine_quarter_rom: quarter-wave sine lookup table.
//
// Holds 2**QADDR_W magnitudes of the first quarter of a sine period, sampled
// half a step off the axis so that the second quarter is the exact mirror
// image of the first:
//
//   rom[k] = round((2**MAG_W - 1) * sin(pi * (2k + 1) / (4 * 2**QADDR_W)))
//
// The table is computed at elaboration time, so changing QADDR_W or MAG_W
// needs no data file.  Storing only one quarter and recovering the rest from
// the symmetry of the sine is the size reduction the design is built around;
// the depth, the width and the half-step sampling are this design's choices.
//
// Interface: addr is sampled on the rising clock edge and mag holds the
// entry one cycle later (synchronous read, as in an FPGA block memory).
module sine_quarter_rom #(
  parameter int unsigned QADDR_W = spwm_pkg::QADDR_W_DEF,  // log2 entries
  parameter int unsigned MAG_W   = spwm_pkg::SAMPLE_W_DEF - 1  // magnitude bits
) (
  input  logic               clk,
  input  logic [QADDR_W-1:0] addr,
  output logic [MAG_W-1:0]   mag
);

  localparam int unsigned DEPTH = 2 ** QADDR_W;

  typedef logic [MAG_W-1:0] rom_t [DEPTH];

  function automatic rom_t build_table();
    rom_t t;
    real  pi_v;
    pi_v = 3.14159265358979323846;
    for (int k = 0; k < DEPTH; k++) begin
      t[k] = MAG_W'($rtoi((2.0 ** MAG_W - 1.0)
                          * $sin(pi_v * (2.0 * k + 1.0) / (4.0 * DEPTH)) + 0.5));
    end
    return t;
  endfunction

  localparam rom_t ROM = build_table();

  always_ff @(posedge clk) begin
    mag <= ROM[addr];
  end

endmodule
