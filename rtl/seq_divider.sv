// seq_divider: unsigned restoring divider, one quotient bit per clock.
//
// On start the dividend and divisor are captured; DW + 1 clocks later done pulses
// for one cycle with quotient = dividend / divisor and remainder = dividend %
// divisor. A zero divisor gives an all-ones quotient (the restoring step
// always succeeds); callers avoid it. busy is high while a division runs and
// start is ignored then. rst_n is an asynchronous, active-low reset.
// This is a helper of the solver and the output averager.
module seq_divider #(
  parameter int unsigned DW = 32,  // dividend / quotient width
  parameter int unsigned VW = 32   // divisor / remainder width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [DW-1:0] dividend,
  input  logic [VW-1:0] divisor,
  output logic          busy,
  output logic          done,
  output logic [DW-1:0] quotient,
  output logic [VW-1:0] remainder
);
  localparam int unsigned CW = $clog2(DW + 1);

  logic [DW-1:0] q;
  logic [VW:0]   rem;
  logic [VW-1:0] dvs;
  logic [CW-1:0] cnt;
  logic [VW:0]   shifted;
  logic          fits;

  always_comb begin
    shifted = {rem[VW-1:0], q[DW-1]};
    fits    = shifted >= {1'b0, dvs};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q    <= '0;
      rem  <= '0;
      dvs  <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          q    <= dividend;
          rem  <= '0;
          dvs  <= divisor;
          cnt  <= CW'(DW);
          busy <= 1'b1;
        end
      end else begin
        if (fits) begin
          rem <= shifted - {1'b0, dvs};
          q   <= {q[DW-2:0], 1'b1};
        end else begin
          rem <= shifted;
          q   <= {q[DW-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign quotient  = q;
  assign remainder = rem[VW-1:0];
endmodule
