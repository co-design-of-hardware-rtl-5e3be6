// Sequential integer square root, root = floor(sqrt(radicand)).
//
// A start pulse loads the radicand; the root is built one bit per cycle,
// most significant first, by trying each bit and keeping it when the
// square still fits. After ROOT_W cycles done pulses and root holds until
// the next start. RAD_W must not exceed 2*ROOT_W.
module seq_isqrt #(
  parameter int unsigned RAD_W  = 40,
  parameter int unsigned ROOT_W = 20
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [RAD_W-1:0]  radicand,
  output logic              busy,
  output logic              done,
  output logic [ROOT_W-1:0] root
);
  logic [RAD_W-1:0]          rad;
  logic [$clog2(ROOT_W)-1:0] bitpos;
  logic [ROOT_W-1:0]         trial;
  logic [2*ROOT_W-1:0]       trial_sq;

  assign trial    = root | (ROOT_W'(1) << bitpos);
  assign trial_sq = (2*ROOT_W)'(trial) * (2*ROOT_W)'(trial);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rad <= '0; bitpos <= '0; busy <= 1'b0; done <= 1'b0; root <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        rad    <= radicand;
        root   <= '0;
        bitpos <= $bits(bitpos)'(ROOT_W-1);
        busy   <= 1'b1;
      end else if (busy) begin
        if (trial_sq <= (2*ROOT_W)'(rad)) root <= trial;
        if (bitpos == 0) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          bitpos <= bitpos - 1'b1;
        end
      end
    end
  end
endmodule
