// spike_discriminator: threshold plus two time-amplitude windows, serving the
// four recording channels of a module in their time slots.
//
// Datapath (per evaluation, channel ch):
//   - a 2:1 mux replaces the filtered sample by the constant 512 while the
//     sequential blanking signal seq_blk is active;
//   - two 3:1 level muxes pick an upper level (L1 / L3 / L5) and a lower level
//     (L0 / L2 / L4) by "select" = 0 / 1 / 2;
//   - two comparators test sample <= upper and sample >= lower;
//   - a 3:1 result mux gives Result = (>= L0) OR (<= L1) for select 0 (crossing
//     of the positive threshold L0 or the negative threshold L1), and
//     Result = both for select 1 (inside window 1, L2..L3) and select 2 (inside
//     window 2, L4..L5).
// Control: every channel has a 10-bit timer that advances once per ADC frame
// (28 us). The control unit's states are ranges of that timer:
//   Timer = 0            idle, select 0; Result = 1 starts the timer
//   0 < Timer < T1       wait
//   T1 <= Timer <= T2    select 1; Result = 0 resets the timer (reject)
//   T2 < Timer < T3      wait
//   T3 <= Timer <= T4    select 2; Result = 0 resets the timer (reject)
//   T4 < Timer <= T5     wait
//   T5 < Timer < T6      SDO = 1 (spike accepted)
//   T6 <= Timer < T7     SDO = 0
//   Timer >= T7          internal reset to 0
// so only the timer is stored per channel. The timer bank also resets a
// channel's timer while its ADB or SDB blanking input is high, and on the
// system reset. T1..T4 are 8 bits and T5..T7 10 bits as in the document.
//
// Timing: when en is high the channel's timer and its SDO bit are updated at
// the clock edge; sdo[c] is registered and holds between slots. The treatment
// of Timer = T5 (waits) and the comparator directions follow the document's
// state chart and window drawing. Forcing all SDO bits low during seq_blk is
// this design's choice (the document shows no SDO during sequential blanking).
module spike_discriminator
  import bsi_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,
  input  logic [1:0]     ch,
  input  logic [DW-1:0]  x,
  input  logic           seq_blk,
  input  logic [NCH-1:0] adb,
  input  logic [NCH-1:0] sdb,
  input  sd_params_t     p,
  output logic [NCH-1:0] sdo,
  output logic [9:0]     timer [NCH]
);

  logic [DW-1:0] din, lvl_hi, lvl_lo;
  logic [1:0]    sel;
  logic          ge_lo, le_hi, result;
  logic [9:0]    t, t_next;
  logic [9:0]    t1, t2, t3, t4;

  always_comb begin
    t1 = 10'(p.t1);
    t2 = 10'(p.t2);
    t3 = 10'(p.t3);
    t4 = 10'(p.t4);
    din = seq_blk ? DW'(MIDSCALE) : x;
    t   = timer[ch];

    // select, from the control state
    if (t >= t1 && t <= t2 && t != 10'd0)      sel = 2'd1;
    else if (t >= t3 && t <= t4 && t != 10'd0) sel = 2'd2;
    else                                       sel = 2'd0;

    unique case (sel)
      2'd1:    begin lvl_hi = p.l3; lvl_lo = p.l2; end
      2'd2:    begin lvl_hi = p.l5; lvl_lo = p.l4; end
      default: begin lvl_hi = p.l1; lvl_lo = p.l0; end
    endcase
    ge_lo  = (din >= lvl_lo);
    le_hi  = (din <= lvl_hi);
    result = (sel == 2'd0) ? (ge_lo || le_hi) : (ge_lo && le_hi);

    // next timer value
    if (t == 10'd0)            t_next = result ? 10'd1 : 10'd0;
    else if (t >= p.t7)        t_next = 10'd0;
    else if (sel != 2'd0)      t_next = result ? t + 10'd1 : 10'd0;
    else                       t_next = t + 10'd1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NCH; c++) timer[c] <= '0;
      sdo <= '0;
    end else begin
      for (int c = 0; c < NCH; c++) begin
        if (adb[c] || sdb[c]) begin
          timer[c] <= '0;
          sdo[c]   <= 1'b0;
        end else if (en && ch == 2'(c)) begin
          timer[c] <= t_next;
          sdo[c]   <= (t_next > p.t5) && (t_next < p.t6) && !seq_blk;
        end else if (seq_blk) begin
          sdo[c]   <= 1'b0;
        end
      end
    end
  end

endmodule
