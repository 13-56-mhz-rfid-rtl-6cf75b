// mod_detector: majority filter that turns per-sample detector hits into a
// clean "modulated" level.
//
// The last WIN = 32 hit flags are kept in a shift register together with
// their count; modulated is high while at least MIN_HITS = 20 of them are set.
// The PCD side feeds it "correlator output >= 10", the PICC side "sample
// below threshold". Window and count follow the design description; sharing
// one module between both sides is this implementation's choice.
//
// Timing: modulated is registered and reflects the hit given with in_valid
// two cycles earlier (count update, then compare).
module mod_detector #(
  parameter int unsigned WIN      = 32,
  parameter int unsigned MIN_HITS = 20
) (
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  input  logic hit,
  output logic modulated
);
  localparam int unsigned CW = $clog2(WIN + 1);

  logic [WIN-1:0] hist;
  logic [CW-1:0]  cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      hist      <= '0;
      cnt       <= '0;
      modulated <= 1'b0;
    end else begin
      if (in_valid) begin
        hist <= {hist[WIN-2:0], hit};
        cnt  <= cnt + CW'(hit) - CW'(hist[WIN-1]);
      end
      modulated <= (cnt >= CW'(MIN_HITS));
    end
  end
endmodule
