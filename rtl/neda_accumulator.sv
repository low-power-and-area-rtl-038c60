// neda_accumulator -- the MUX, adder and right-shift register of a NEDA
// unit: forms Z = sum_{i=0}^{W-1} m(i+1) * 2^i one row per clock.
//
// The partial sums arrive in parallel (m[0] = m(1) is the LSB row, m[W-1]
// the already negated sign row). A start pulse (accepted while ready) clears
// the accumulator; then on each of the next W clocks the multiplexer picks
// m(step+1), the adder forms T = P + m(step+1), the upper part P takes
// T >>> 1 and the bit shifted out enters a W-bit low register L from the top.
// After W steps y = {P, L} is the exact signed inner product; the low bits
// leave the adder one per clock, so the adder stays M_W + 1 bits wide.
//
// Timing: start sampled on edge 0, steps on edges 1 .. W, done is a one-cycle
// pulse after edge W and y holds its value until the next start. ready is
// low while busy, so a new start is taken at the earliest in the cycle done
// is high: one result every W + 1 clocks. m must stay stable during the W
// steps (the caller registers its inputs). The step order and the
// right-shift accumulate follow the published worked example; the handshake
// is this design's own.
module neda_accumulator #(
  parameter int unsigned M_W = 8,
  parameter int unsigned W   = neda_pkg::COEF_W,
  localparam int unsigned Y_W = M_W + W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic                 ready,
  input  logic [W-1:0][M_W-1:0] m,
  output logic                 done,
  output logic [Y_W-1:0]       y
);
  localparam int unsigned SW = (W > 1) ? $clog2(W) : 1;

  logic          busy;
  logic [SW-1:0] step;
  logic [M_W:0]  p;      // upper part of the running sum
  logic [W-1:0]  l;      // bits already shifted out
  logic [M_W:0]  mux_q;  // selected row, sign-extended
  logic [M_W:0]  t;

  assign ready = !busy;

  always_comb mux_q = (M_W+1)'(signed'(m[step]));

  ripple_adder #(.W(M_W + 1)) u_add (
    .a(p), .b(mux_q), .cin(1'b0), .sum(t), .cout()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      step <= '0;
      p    <= '0;
      l    <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (busy) begin
        p <= {t[M_W], t[M_W:1]};
        l <= {t[0], l[W-1:1]};
        if (step == SW'(W - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          step <= step + 1'b1;
        end
      end else if (start) begin
        busy <= 1'b1;
        step <= '0;
        p    <= '0;
        l    <= '0;
      end
    end
  end

  assign y = {p[M_W-1:0], l};
endmodule
