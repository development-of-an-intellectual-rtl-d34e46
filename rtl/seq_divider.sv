// seq_divider -- unsigned restoring divider, one quotient bit per clock.
//
// A start pulse loads dividend and divisor; DIVIDEND_W clocks later done
// pulses for one clock with quotient = dividend / divisor and
// rem_nz = (dividend % divisor != 0). busy is high in between. The result
// of a zero divisor is meaningless; callers exclude it. Used by the schedulability checker to
// turn Ci/Ti into a fixed-point fraction without a combinational divider.
module seq_divider #(
  parameter int unsigned DIVIDEND_W = 32,
  parameter int unsigned DIVISOR_W  = 16
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  start,
  input  logic [DIVIDEND_W-1:0] dividend,
  input  logic [DIVISOR_W-1:0]  divisor,
  output logic                  busy,
  output logic                  done,
  output logic [DIVIDEND_W-1:0] quotient,
  output logic                  rem_nz
);

  localparam int unsigned CNT_W = $clog2(DIVIDEND_W + 1);

  logic [DIVIDEND_W-1:0] shreg;     // dividend bits still to bring down / quotient bits
  logic [DIVISOR_W:0]    rem;       // partial remainder, one bit wider
  logic [DIVISOR_W-1:0]  dvs;
  logic [CNT_W-1:0]      cnt;
  logic [DIVISOR_W:0]    trial;
  logic [DIVISOR_W:0]    rem_sh;

  assign rem_sh = {rem[DIVISOR_W-1:0], shreg[DIVIDEND_W-1]};
  assign trial  = rem_sh - {1'b0, dvs};

  always_ff @(posedge clk) begin
    if (rst) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      shreg <= '0;
      rem   <= '0;
      dvs   <= '0;
      cnt   <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy  <= 1'b1;
        shreg <= dividend;
        rem   <= '0;
        dvs   <= divisor;
        cnt   <= CNT_W'(DIVIDEND_W);
      end else if (busy) begin
        if (!trial[DIVISOR_W]) begin
          rem   <= trial;
          shreg <= {shreg[DIVIDEND_W-2:0], 1'b1};
        end else begin
          rem   <= rem_sh;
          shreg <= {shreg[DIVIDEND_W-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == CNT_W'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign quotient = shreg;
  assign rem_nz   = (rem != '0);

endmodule
