// seq_div: signed sequential divider, q = n / d truncated toward zero.
//
// Restoring division on magnitudes, one quotient bit per clock, then the sign
// is applied. Used by the controller for the 1/x5 factor of the control law.
// A divisor of zero returns the largest magnitude with the dividend's sign.
//
// Interface and timing: start is accepted when busy = 0; n and d are sampled
// then. done pulses for one cycle exactly NW + 1 clocks after start, with q
// valid from then until the next start.
module seq_div #(
  parameter int NW = 48,  // dividend and quotient width
  parameter int DW = 22   // divisor width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [NW-1:0] n,
  input  logic signed [DW-1:0] d,
  output logic                 busy,
  output logic                 done,
  output logic signed [NW-1:0] q
);

  localparam int CW = $clog2(NW + 1);

  logic [NW-1:0] num_mag, quo;
  logic [DW-1:0] den_mag;
  logic [DW:0]   rem;
  logic          neg, dz;
  logic [CW-1:0] cnt;
  logic [DW+1:0] trial;

  assign trial = {rem, num_mag[NW-1]} - {2'b00, den_mag};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      q       <= '0;
      num_mag <= '0;
      quo     <= '0;
      den_mag <= '0;
      rem     <= '0;
      neg     <= 1'b0;
      dz      <= 1'b0;
      cnt     <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy    <= 1'b1;
        num_mag <= n[NW-1] ? NW'(-n) : NW'(n);
        den_mag <= d[DW-1] ? DW'(-d) : DW'(d);
        neg     <= n[NW-1] ^ d[DW-1];
        dz      <= (d == '0);
        rem     <= '0;
        quo     <= '0;
        cnt     <= CW'(NW);
      end else if (busy) begin
        if (cnt != '0) begin
          num_mag <= num_mag << 1;
          if (!trial[DW+1]) begin
            rem <= trial[DW:0];
            quo <= {quo[NW-2:0], 1'b1};
          end else begin
            rem <= {rem[DW-1:0], num_mag[NW-1]};
            quo <= {quo[NW-2:0], 1'b0};
          end
          cnt <= cnt - 1'b1;
        end else begin
          busy <= 1'b0;
          done <= 1'b1;
          if (dz)
            q <= neg ? {1'b1, {(NW-1){1'b0}}} + 1'b1 : {1'b0, {(NW-1){1'b1}}};
          else
            q <= neg ? -$signed(quo) : $signed(quo);
        end
      end
    end
  end

endmodule
