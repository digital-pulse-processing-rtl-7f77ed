// sign_detector: tentative decoded bit from a variable bus.
//
// Listens to both halves of a variable bus and keeps a saturating up/down
// count of Delta0 - Delta1: +1 per (0) pulse, -1 per (1) pulse, both at once
// cancel. The tentative bit is 1 while the count is negative. The count starts
// at zero, where the detector has not yet seen evidence; 'decided' is low only
// then, which keeps an untouched decoder from reporting the all-zero word.
//
// Interface: bus0/bus1 pulses in; bit_o and decided registered outputs.
// A saturating count of CNT_W bits is this design's choice for "continuously
// determine the sign"; a small count lets a wrong early sign be corrected
// after a few pulses.
module sign_detector #(
  parameter int CNT_W = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic bus0,
  input  logic bus1,
  output logic bit_o,
  output logic decided
);

  localparam logic signed [CNT_W-1:0] CMAX = (CNT_W)'((1 << (CNT_W - 1)) - 1);
  localparam logic signed [CNT_W-1:0] CMIN = -CMAX;

  logic signed [CNT_W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt <= '0;
    end else if (bus0 && !bus1 && cnt != CMAX) begin
      cnt <= cnt + 1'b1;
    end else if (bus1 && !bus0 && cnt != CMIN) begin
      cnt <= cnt - 1'b1;
    end
  end

  assign bit_o   = cnt[CNT_W-1];
  assign decided = cnt != '0;

endmodule
