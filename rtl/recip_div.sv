// recip_div: serial divider for the Barrett constant of the quick reduction.
//
// Computes q = floor(2^E / d) by restoring division, one quotient bit per
// clock, E+1 clocks after start.  The MM engine uses it once per loaded
// modulus to form m' = floor(2^(2D+2) / (m_hat + 1)) for each reduction
// length D.  The design description treats m' as a given constant; computing
// it in hardware with this divider is this implementation's choice.
// Interface: pulse start with d stable (d > 0); busy is high while running;
// done pulses for one clock when q is valid.  q holds until the next start.
module recip_div #(
  parameter int unsigned E   = 158,   // numerator is 2^E
  parameter int unsigned DW  = 81,    // divisor width
  parameter int unsigned QW  = 80     // quotient width kept
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [DW-1:0] d,
  output logic [QW-1:0] q,
  output logic          busy,
  output logic          done
);
  localparam int unsigned CW = shaper_pkg::clog2i(E + 2);

  logic [DW:0]   rem;
  logic [DW-1:0] dr;
  logic [CW-1:0] bitpos;
  logic [DW:0]   trial;

  // Next partial remainder: shift in the numerator bit (1 only at bit E).
  assign trial = {rem[DW-1:0], (bitpos == CW'(E))};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      rem    <= '0;
      dr     <= '0;
      q      <= '0;
      bitpos <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy   <= 1'b1;
        rem    <= '0;
        dr     <= d;
        q      <= '0;
        bitpos <= CW'(E);
      end else if (busy) begin
        if (trial >= {1'b0, dr}) begin
          rem <= trial - {1'b0, dr};
          q   <= {q[QW-2:0], 1'b1};
        end else begin
          rem <= trial;
          q   <= {q[QW-2:0], 1'b0};
        end
        if (bitpos == '0) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          bitpos <= bitpos - CW'(1);
        end
      end
    end
  end
endmodule
