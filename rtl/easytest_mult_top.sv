// easytest_mult_top: the two C-testable array multipliers side by side.
//
//  * mcs: the MCS_N x MCS_N unsigned multiplier chip (modified carry-save
//    array, carry-propagate row, multiplexed pins with registers and a
//    three-state controller).  Fully tested by 16 test patterns applied through
//    its seven test-control pins, whatever its size.
//  * bw: the BW_N x BW_N two's complement Baugh-Wooley array with modified
//    cells, purely combinational, tested by 55 patterns through its d and e
//    inputs.
// The two share nothing; each keeps its own ports, prefixed mcs_ and bw_.
// Defaults: 16 x 16 for the chip, 5 x 5 for the Baugh-Wooley array.
module easytest_mult_top
  import mult_pkg::*;
#(
  parameter int unsigned MCS_N = 16,
  parameter int unsigned BW_N  = 5
) (
  input  logic               clk,
  input  logic               rst_n,
  // modified carry-save multiplier chip
  input  logic               mcs_start,
  input  logic [2*MCS_N-1:0] mcs_pins_in,
  input  mcs_test_pins_t     mcs_test,
  output logic [2*MCS_N-1:0] mcs_pins_out,
  output logic               mcs_pins_oe,
  output logic               mcs_carry_out,
  output logic               mcs_busy,
  output logic               mcs_done,
  // modified Baugh-Wooley array
  input  logic [BW_N-1:0]    bw_a,
  input  logic [BW_N-1:0]    bw_b,
  input  logic [BW_N-2:0]    bw_d,
  input  logic               bw_e,
  output logic [2*BW_N-1:0]  bw_p
);
  mcs_chip #(.N(MCS_N)) u_mcs (
    .clk(clk), .rst_n(rst_n), .start(mcs_start), .pins_in(mcs_pins_in),
    .test_pins(mcs_test), .pins_out(mcs_pins_out), .pins_oe(mcs_pins_oe),
    .carry_out(mcs_carry_out), .busy(mcs_busy), .done(mcs_done)
  );

  bw_array_mult #(.N(BW_N)) u_bw (
    .a(bw_a), .b(bw_b), .d(bw_d), .e(bw_e), .p(bw_p)
  );
endmodule
