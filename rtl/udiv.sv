// udiv: sequential unsigned divider (restoring, one quotient bit per clock).
//
// Pulse start with the operands; W clocks later done pulses and quot/rem hold
// num / den and num % den. busy is high in between. Division by zero gives an
// all-ones quotient. Used by the chirp controller to find how many DDS sweep steps
// lie between the start and stop tuning words.
module udiv #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] num,
  input  logic [W-1:0] den,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quot,
  output logic [W-1:0] rem
);
  logic [W-1:0]         den_q;
  logic [$clog2(W+1)-1:0] n;

  wire [W+1:0] trial = {1'b0, rem, quot[W-1]} - {2'b0, den_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      quot  <= '0;
      rem   <= '0;
      den_q <= '0;
      n     <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy  <= 1'b1;
        quot  <= num;   // dividend shifts out of the top while quotient bits shift in
        rem   <= '0;
        den_q <= den;
        n     <= '0;
      end else if (busy) begin
        if (trial[W+1]) begin
          rem  <= {rem[W-2:0], quot[W-1]};
          quot <= {quot[W-2:0], 1'b0};
        end else begin
          rem  <= trial[W-1:0];
          quot <= {quot[W-2:0], 1'b1};
        end
        n <= n + 1'b1;
        if (n == ($clog2(W+1))'(W - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
