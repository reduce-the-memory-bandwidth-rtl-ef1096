// seq_div: sequential signed divider used by triangle setup.
//
// Restoring division of magnitudes, one quotient bit per cycle, N cycles
// per division; the quotient is truncated toward zero and its sign is the
// exclusive-or of the operand signs. |dividend| must be below 2**N. A zero
// divisor returns 0. start is taken when busy is low; done pulses for one
// cycle with the quotient valid from then until the next start.
module seq_div
  import vdr_pkg::*;
#(
  parameter int N = 48
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fx_t  dividend,
  input  fx_t  divisor,
  output logic busy,
  output logic done,
  output fx_t  quotient
);
  logic [N-1:0]  dvd, quo;
  logic [N:0]    rem;
  logic [FX_W-1:0] dvs;
  logic          neg;
  logic [$clog2(N+1)-1:0] cnt;
  logic [N:0]    rem_sh;

  assign rem_sh = {rem[N-1:0], dvd[N-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; quotient <= '0;
      dvd <= '0; quo <= '0; rem <= '0; dvs <= '0; neg <= 1'b0; cnt <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          if (divisor == 0) begin
            quotient <= '0;
            done     <= 1'b1;
          end else begin
            busy <= 1'b1;
            dvd  <= N'(dividend < 0 ? -dividend : dividend);
            dvs  <= divisor < 0 ? -divisor : divisor;
            neg  <= (dividend < 0) ^ (divisor < 0);
            rem  <= '0;
            quo  <= '0;
            cnt  <= '0;
          end
        end
      end else begin
        dvd <= dvd << 1;
        if ({{(FX_W-N-1){1'b0}}, rem_sh} >= dvs) begin
          rem <= rem_sh - (N+1)'(dvs);
          quo <= {quo[N-2:0], 1'b1};
        end else begin
          rem <= rem_sh;
          quo <= {quo[N-2:0], 1'b0};
        end
        cnt <= cnt + 1'b1;
        if (cnt == ($clog2(N+1))'(N - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          if ({{(FX_W-N-1){1'b0}}, rem_sh} >= dvs)
            quotient <= neg ? -fx_t'({quo[N-2:0], 1'b1}) : fx_t'({quo[N-2:0], 1'b1});
          else
            quotient <= neg ? -fx_t'({quo[N-2:0], 1'b0}) : fx_t'({quo[N-2:0], 1'b0});
        end
      end
    end
  end

endmodule
