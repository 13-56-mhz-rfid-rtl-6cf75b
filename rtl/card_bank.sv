// card_bank: the set of cards the PICC side can emulate.
//
// Holds N_CARDS 4-byte UIDs as a parameter table and presents the one picked
// by card_sel. The selection is registered and only follows card_sel while
// hold is low, so the emulated card cannot change in the middle of a
// handshake (the top level raises hold while the PICC is not idle). The
// default table holds the two UIDs used when the emulator was demonstrated
// with commercial readers, 0x12345678 and 0x00BC614E; the number of cards
// and the hold rule are this implementation's choices.
//
// Timing: uid changes one cycle after card_sel when hold is low. A card_sel
// beyond the table selects card 0.
module card_bank #(
  parameter int unsigned N_CARDS = 2,
  parameter logic [N_CARDS-1:0][31:0] UIDS = {32'h00BC614E, 32'h12345678}
) (
  input  logic                               clk,
  input  logic                               rst,
  input  logic                               hold,
  input  logic [(N_CARDS > 1 ? $clog2(N_CARDS) : 1)-1:0] card_sel,
  output logic [31:0]                        uid
);
  always_ff @(posedge clk) begin
    if (rst) begin
      uid <= UIDS[0];
    end else if (!hold) begin
      uid <= (32'(card_sel) < 32'(N_CARDS)) ? UIDS[card_sel] : UIDS[0];
    end
  end
endmodule
