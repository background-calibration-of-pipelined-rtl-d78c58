// serial_divider: restoring shift-and-subtract divider.
//
// Computes quotient = dividend / divisor and the remainder for unsigned
// operands, one quotient bit per cycle, most significant first: the partial
// remainder is shifted left by one dividend bit, and the divisor is subtracted
// when it fits. Used where an estimate updates far slower than the sample
// rate, so a small serial unit is enough. Division by zero returns an
// all-ones quotient.
// Timing: `start` latches the operands; `done` pulses NW+1 cycles later with
// the results, which then stay until the next start. `busy` is high between.
module serial_divider #(
  parameter int NW   = 25,  // dividend and quotient width
  parameter int DWID = 18   // divisor width
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [NW-1:0]   dividend,
  input  logic [DWID-1:0] divisor,
  output logic            busy,
  output logic            done,
  output logic [NW-1:0]   quotient,
  output logic [DWID-1:0] remainder
);
  logic [NW-1:0]   q;
  logic [DWID:0]   r;
  logic [DWID-1:0] dv;
  logic [$clog2(NW+1)-1:0] n;
  logic [DWID:0]   r_shift;

  assign r_shift = {r[DWID-1:0], q[NW-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0; r <= '0; dv <= '0; n <= '0;
      busy <= 1'b0; done <= 1'b0;
      quotient <= '0; remainder <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        q    <= dividend;
        r    <= '0;
        dv   <= divisor;
        n    <= ($clog2(NW+1))'(NW);
        busy <= 1'b1;
      end else if (busy) begin
        if (n == 0) begin
          busy      <= 1'b0;
          done      <= 1'b1;
          quotient  <= q;
          remainder <= r[DWID-1:0];
        end else begin
          n <= n - 1'b1;
          if (r_shift >= {1'b0, dv}) begin
            r <= r_shift - {1'b0, dv};
            q <= {q[NW-2:0], 1'b1};
          end else begin
            r <= r_shift;
            q <= {q[NW-2:0], 1'b0};
          end
        end
      end
    end
  end
endmodule
