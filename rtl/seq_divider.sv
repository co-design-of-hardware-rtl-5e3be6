// Sequential unsigned restoring divider.
//
// A start pulse loads dividend and divisor; one quotient bit is found per
// cycle, most significant first, so the quotient is ready NUM_W cycles
// later, when done pulses for one cycle. quotient holds until the next
// start. A divisor of zero gives an all-ones quotient. Used where a
// per-frame or per-feature division is needed and a combinational divider
// would be wasteful.
module seq_divider #(
  parameter int unsigned NUM_W = 24,
  parameter int unsigned DEN_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [NUM_W-1:0] dividend,
  input  logic [DEN_W-1:0] divisor,
  output logic             busy,
  output logic             done,
  output logic [NUM_W-1:0] quotient
);
  logic [DEN_W:0]           rem;
  logic [DEN_W-1:0]         den;
  logic [$clog2(NUM_W+1)-1:0] cnt;
  logic [DEN_W:0]           trial;

  assign trial = {rem[DEN_W-1:0], quotient[NUM_W-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem <= '0; den <= '0; cnt <= '0; busy <= 1'b0; done <= 1'b0;
      quotient <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        quotient <= dividend;
        den      <= divisor;
        rem      <= '0;
        cnt      <= $bits(cnt)'(NUM_W);
        busy     <= 1'b1;
      end else if (busy) begin
        // quotient doubles as the dividend shift register
        if (trial >= {1'b0, den}) begin
          rem      <= trial - {1'b0, den};
          quotient <= {quotient[NUM_W-2:0], 1'b1};
        end else begin
          rem      <= trial;
          quotient <= {quotient[NUM_W-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
