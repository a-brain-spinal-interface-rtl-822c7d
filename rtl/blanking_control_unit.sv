// blanking_control_unit: decides which recording channels are blanked.
//
// Individual mode (PG_Enable = 0): a lookup table turns the four combination
// codes into static signals BlankXY, high when the trigger function of
// stimulating channel X depends on PASS_Y (flipping PASS_Y changes the code's
// output for some input). Stimulus-dependent blanking is then
//   SDB_Y = OR over X of (BlankXY AND StimX)
// so a recording channel that took part in a trigger stays blanked while that
// stimulation lasts. In the sequential modes SDB is held low.
// Sequential modes (PG_Enable = 1): SEQ_BLK = PG_Enable AND (SEQ_TRIG OR
// Stim4) blanks every recording channel from the start of the sequence until
// stimulation on channel 4 ends.
// Activity-dependent blanking (ADB) from the counter & delay units is passed
// on to the spike discriminator unchanged.
// The AND-OR structures follow the document's blanking diagrams; "depends on
// PASS_Y" as the table's content and the gating of SDB by individual mode are
// this design's reading. Purely combinational.
module blanking_control_unit
  import bsi_pkg::*;
(
  input  logic [NCH-1:0][15:0] code,
  input  logic [NCH-1:0]       stim,
  input  logic                 pg_enable,
  input  logic                 seq_trig,
  input  logic [NCH-1:0]       adb_in,
  output logic [NCH-1:0]       adb,
  output logic [NCH-1:0]       sdb,
  output logic                 seq_blk,
  output logic [NCH-1:0][NCH-1:0] blank  // [x][y] = BlankXY (x, y from 0)
);

  always_comb begin
    for (int x = 0; x < NCH; x++) begin
      for (int y = 0; y < NCH; y++) begin
        blank[x][y] = 1'b0;
        for (int i = 0; i < 16; i++)
          if (code[x][i] != code[x][i ^ (1 << y)]) blank[x][y] = 1'b1;
      end
    end
    for (int y = 0; y < NCH; y++) begin
      sdb[y] = 1'b0;
      for (int x = 0; x < NCH; x++)
        if (blank[x][y] && stim[x]) sdb[y] = 1'b1;
      sdb[y] = sdb[y] && !pg_enable;
    end
    seq_blk = pg_enable && (seq_trig || stim[NCH-1]);
    adb     = adb_in;
  end

endmodule
