// seq_divider: unsigned restoring divider producing one quotient bit per clock.
//
// quo = num / den (truncated). A start loads the dividend; NW clocks later done
// pulses and quo holds the result until the next start. The source design asks for
// divisions in the softmax and the input normalisation but not for their circuit;
// the bit-serial form is this design's choice, trading time for area. Division by zero returns
// all ones. Used by the softmax (its seven divisions) and by the input normalizer.
// rst is synchronous.
module seq_divider #(
  parameter int unsigned NW = 32,  // dividend / quotient width
  parameter int unsigned DW = 18   // divisor width
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [NW-1:0] num,
  input  logic [DW-1:0] den,
  output logic          busy,
  output logic          done,
  output logic [NW-1:0] quo
);
  localparam int unsigned CW = $clog2(NW + 1);

  logic [DW:0]   rem;      // one extra bit for the trial subtraction
  logic [DW-1:0] dvs;
  logic [NW-1:0] q;
  logic [CW-1:0] cnt;
  logic [DW:0]   shifted, trial;

  always_comb begin
    shifted = {rem[DW-1:0], q[NW-1]};
    trial   = shifted - {1'b0, dvs};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      done <= 1'b0;
      rem  <= '0;
      dvs  <= '0;
      q    <= '0;
      cnt  <= '0;
      quo  <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        rem  <= '0;
        dvs  <= den;
        q    <= num;
        cnt  <= CW'(NW);
      end else if (busy) begin
        // q shifts left; its top bit enters the remainder, the new quotient bit enters at the bottom
        if (!trial[DW]) begin
          rem <= trial;
          q   <= {q[NW-2:0], 1'b1};
        end else begin
          rem <= shifted;
          q   <= {q[NW-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          quo  <= (dvs == '0) ? '1 : (!trial[DW] ? {q[NW-2:0], 1'b1} : {q[NW-2:0], 1'b0});
        end
      end
    end
  end
endmodule
