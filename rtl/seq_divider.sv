// seq_divider: signed sequential divider, one quotient bit per cycle.
//
// Divides a signed W-bit numerator by a signed W-bit denominator by
// restoring division of the magnitudes, then fixes the sign (quotient
// truncated toward zero). start is taken while !busy; done pulses W+1 cycles
// later with the quotient. A zero denominator gives a quotient of all ones in
// magnitude. Used by the servo for the frequency-offset ratio.
module seq_divider #(
  parameter int unsigned W = 64
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                start,
  input  logic signed [W-1:0] num,
  input  logic signed [W-1:0] den,
  output logic                busy,
  output logic                done,
  output logic signed [W-1:0] quo
);
  localparam int unsigned CW = $clog2(W + 1);

  logic [W-1:0]  q, d;
  logic [W-1:0]  r;          // remainder, always below d
  logic [CW-1:0] n;
  logic          neg;
  logic [W:0]    r_shift;

  assign r_shift = {r, q[W-1]};

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0; done <= 1'b0; quo <= '0;
      q <= '0; d <= '0; r <= '0; n <= '0; neg <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy && start) begin
        busy <= 1'b1;
        q    <= num[W-1] ? W'(-num) : W'(num);
        d    <= den[W-1] ? W'(-den) : W'(den);
        neg  <= num[W-1] ^ den[W-1];
        r    <= '0;
        n    <= CW'(W);
      end else if (busy) begin
        if (n == '0) begin
          busy <= 1'b0;
          done <= 1'b1;
          quo  <= neg ? -signed'(q) : signed'(q);
        end else begin
          n <= n - 1'b1;
          if (r_shift >= {1'b0, d}) begin
            r <= W'(r_shift - {1'b0, d});
            q <= {q[W-2:0], 1'b1};
          end else begin
            r <= W'(r_shift);
            q <= {q[W-2:0], 1'b0};
          end
        end
      end
    end
  end
endmodule
