// mcs_chip: C-testable n x n multiplier chip (MCS/CP array plus the I/O
// periphery that lets 2n shared pins carry both operands and the product).
//
// The package has too few pins for two n-bit operands and a 2n-bit product on
// separate pins, so the same 2n pins are used in both directions, with
// registers and a small controller around the combinational array:
//   IDLE : pins are inputs.  When start = 1 the operands are captured from the
//          pins (a = pins_in[n-1:0], b = pins_in[2n-1:n]) together with the
//          seven test-control pins.
//   MULT : one clock for the array; its result is captured in the product
//          register.
//   OUT  : pins_oe = 1 and the 2n-bit product is driven on the pins, with the
//          carry-propagate row's last carry on carry_out; done = 1.
// So a product appears two clocks after the start cycle, and a new operation
// can start in the cycle after OUT (one operation every three clocks).  start
// is ignored while busy.
//
// Test mode needs no mode pin: the tester drives the seven test-control pins
// (row-0 c and d inputs and leftmost-diagonal c inputs by parity, and the
// carry-in of the carry-propagate row), which are 0 for multiplication.
// Pin multiplexing with registers and control is what the design calls for;
// the three-state controller, the pin assignment and the carry_out pin are
// this implementation's choices.  Reset is synchronous and active low.
module mcs_chip
  import mult_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [2*N-1:0] pins_in,
  input  mcs_test_pins_t test_pins,
  output logic [2*N-1:0] pins_out,
  output logic           pins_oe,
  output logic           carry_out,
  output logic           busy,
  output logic           done
);
  typedef enum logic [1:0] {S_IDLE, S_MULT, S_OUT} state_t;

  state_t         state;
  logic [N-1:0]   a_q, b_q;
  mcs_test_pins_t t_q;
  logic [2*N:0]   p_d, p_q;
  logic [63:0]    c0_fill, d0_fill, cl_fill;

  always_comb begin
    c0_fill = parity_fill(t_q.c0_even, t_q.c0_odd);
    d0_fill = parity_fill(t_q.d0_even, t_q.d0_odd);
    cl_fill = parity_fill(t_q.cl_even, t_q.cl_odd);
  end

  mcs_cp_mult #(.N(N)) u_mult (
    .a(a_q), .b(b_q),
    .c0(c0_fill[N-1:0]), .d0(d0_fill[N-1:0]), .cl(cl_fill[N-1:0]),
    .cin(t_q.cin), .p(p_d)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      a_q   <= '0;
      b_q   <= '0;
      t_q   <= '0;
      p_q   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          a_q   <= pins_in[N-1:0];
          b_q   <= pins_in[2*N-1:N];
          t_q   <= test_pins;
          state <= S_MULT;
        end
        S_MULT: begin
          p_q   <= p_d;
          state <= S_OUT;
        end
        S_OUT:   state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    busy      = (state != S_IDLE);
    done      = (state == S_OUT);
    pins_oe   = done;
    pins_out  = done ? p_q[2*N-1:0] : '0;
    carry_out = done & p_q[2*N];
  end

  // The pins drive only while the product is presented.
  assert property (@(posedge clk) disable iff (!rst_n) pins_oe |-> done);
  // A product is presented only two clocks after an accepted start.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == S_IDLE && start) |=> (state == S_MULT) ##1 done);

  logic [63-N:0] unused_fill;
  assign unused_fill = c0_fill[63:N] ^ d0_fill[63:N] ^ cl_fill[63:N];
endmodule
