// seq_div: unsigned restoring divider, one quotient bit per cycle.
//
// `start` loads num and den; N cycles later `done` pulses for one cycle with
// quo = num / den and rem = num % den. den = 0 gives an all-ones quotient.
// Used by the matrix inversion for the reciprocal of each pivot.
module seq_div #(
  parameter int N = 96
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] num,
  input  logic [N-1:0] den,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] quo,
  output logic [N-1:0] rem
);

  logic [N-1:0]         d;
  logic [$clog2(N):0]   cnt;
  logic [N+1:0]         trial;

  assign trial = {1'b0, rem, quo[N-1]} - {2'b00, d};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; quo <= '0; rem <= '0; d <= '0; cnt <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1; quo <= num; rem <= '0; d <= den; cnt <= '0;
      end else if (busy) begin
        // shift the next dividend bit into the partial remainder
        if (!trial[N+1]) begin
          rem <= trial[N-1:0];
          quo <= {quo[N-2:0], 1'b1};
        end else begin
          rem <= {rem[N-2:0], quo[N-1]};
          quo <= {quo[N-2:0], 1'b0};
        end
        cnt <= cnt + 1'b1;
        if (cnt == ($clog2(N)+1)'(N-1)) begin
          busy <= 1'b0; done <= 1'b1;
        end
      end
    end
  end

endmodule
