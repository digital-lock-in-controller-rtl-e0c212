// zcd_sampler: one channel of the sampling block (one resonant tank).
//
// The zero-current-detection (ZCD) sensor of a tank reports, through its
// 2-bit code, the polarity of the resonant current after the tank's
// switches turn off: 11 early, 00 late, 01 zero current. The code is only
// meaningful in a window that begins an unknown inherent delay after the
// controller's turn-off command and ends when the next switching state
// starts. Two methods, selected by single_mode, find that window:
//
//  * Continuous sampling (single_mode = 0): the synchronized ZCD code is
//    read every clock from the turn-off command to the end of the
//    dead-time. The reading is early if an 11 was seen and no 00, late if a
//    00 was seen and no 11, and ZCS otherwise (this combining rule is this
//    design's choice).
//  * Single sample (single_mode = 1): one strobe, delta delay-elements after
//    the gate's falling edge, captures the code. The strobe is made like a
//    gate pulse: whole clocks counted from the turn-off command, then a
//    hr_delay_line tap. The pulse's own fine delay (off_fine) is added so
//    that delta is measured from the real gate edge.
//
// Inherent-delay estimation (est_req high, for use with single sampling): a
// pre-defined early-switching on-time is applied by the governor; starting
// at delta = 0 the strobe moves one delay element later after every
// reading that is not 11. The first delta that reads 11 is kept as
// delta_s, the minimum gate-to-sample delay with a valid reading, and
// est_done rises. If DW bits run out, the largest delta is kept.
//
// Timing: pre_off, off_fine, state and dt_end come from the sequencer. The
// reading leaves on samp/samp_valid SYNC+1 clocks after the dead-time ends,
// tagged with the switching state it belongs to (samp_state).
`timescale 1ps/1ps
module zcd_sampler
  import lockin_pkg::*;
#(
  parameter int unsigned DW       = 10,   // delta width, in delay elements
  parameter int unsigned SYNC     = 2,    // synchronizer stages
  parameter int unsigned DELAY_PS = 3125
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [1:0]           zcd,          // asynchronous sensor code
  input  logic                 single_mode,
  input  logic                 est_req,
  input  logic                 pre_off,
  input  logic [FINE_BITS-1:0] off_fine,
  input  logic                 state,
  input  logic                 dt_end,
  output logic                 samp_valid,
  output zcd_t                 samp,
  output logic                 samp_state,
  output logic                 est_done,
  output logic [DW-1:0]        delta_s
);
  localparam int unsigned CW = DW - FINE_BITS + 1;

  // ---------------- synchronizers and window controls ----------------
  logic [1:0]    zs   [SYNC];
  logic [1:0]    cs   [SYNC];      // captured single-sample code
  logic [SYNC:0] pre_d, dte_d;
  logic [1:0]    cap;
  logic          collecting, seen_e, seen_l, tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < SYNC; i++) begin
        zs[i] <= ZCD_ZCS;
        cs[i] <= ZCD_ZCS;
      end
      pre_d <= '0;
      dte_d <= '0;
    end else begin
      zs[0] <= zcd;
      cs[0] <= cap;
      for (int i = 1; i < SYNC; i++) begin
        zs[i] <= zs[i-1];
        cs[i] <= cs[i-1];
      end
      pre_d <= {pre_d[SYNC-1:0], pre_off};
      dte_d <= {dte_d[SYNC-1:0], dt_end};
    end
  end

  // ---------------- single-sample strobe ----------------
  logic [DW-1:0]        delta_x, delta;
  logic [DW:0]          total;
  logic [CW-1:0]        scnt;
  logic [FINE_BITS-1:0] ssel;
  logic                 strb_pre, strobe;

  assign delta = est_req ? delta_x : delta_s;
  assign total = {1'b0, delta} + (DW+1)'(off_fine);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scnt     <= '0;
      ssel     <= '0;
      strb_pre <= 1'b0;
    end else begin
      strb_pre <= 1'b0;
      if (pre_off && single_mode) begin
        ssel <= total[FINE_BITS-1:0];
        if (total[DW:FINE_BITS] == '0) strb_pre <= 1'b1;   // within this clock
        else                           scnt     <= CW'(total[DW:FINE_BITS]);
      end else if (scnt != '0) begin
        scnt <= scnt - 1'b1;
        if (scnt == CW'(1)) strb_pre <= 1'b1;
      end
    end
  end

  hr_delay_line #(.TAPS(1 << FINE_BITS), .DELAY_PS(DELAY_PS)) u_sdl (
    .din (strb_pre),
    .sel (ssel),
    .dly (strobe)
  );

  // the single sample, and a toggle that tells the clock domain a strobe
  // fired; a window without a strobe gives a ZCS reading (no correction)
  logic cap_tgl, tgl_ref;
  logic [SYNC-1:0] tgl_s;

  always_ff @(posedge strobe or negedge rst_n)
    if (!rst_n) begin
      cap     <= ZCD_ZCS;
      cap_tgl <= 1'b0;
    end else begin
      cap     <= zcd;
      cap_tgl <= ~cap_tgl;
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      tgl_s   <= '0;
      tgl_ref <= 1'b0;
    end else begin
      tgl_s <= {tgl_s[SYNC-2:0], cap_tgl};
      if (pre_d[SYNC]) tgl_ref <= tgl_s[SYNC-1];
    end

  // ---------------- window state machine and reporting ----------------
  zcd_t reading;
  logic fin_e, fin_l;

  assign fin_e = seen_e || (zs[SYNC-1] == ZCD_EARLY);
  assign fin_l = seen_l || (zs[SYNC-1] == ZCD_LATE);

  always_comb begin
    if (single_mode)
      reading = (tgl_s[SYNC-1] == tgl_ref || cs[SYNC-1] == ZCD_BAD)
                ? ZCD_ZCS : zcd_t'(cs[SYNC-1]);
    else if (fin_e && !fin_l) reading = ZCD_EARLY;
    else if (fin_l && !fin_e) reading = ZCD_LATE;
    else                      reading = ZCD_ZCS;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      collecting <= 1'b0;
      seen_e     <= 1'b0;
      seen_l     <= 1'b0;
      tag        <= 1'b0;
      samp_valid <= 1'b0;
      samp       <= ZCD_ZCS;
      samp_state <= 1'b0;
      est_done   <= 1'b0;
      delta_s    <= '0;
      delta_x    <= '0;
    end else begin
      samp_valid <= 1'b0;
      if (pre_off) tag <= state;
      if (pre_d[SYNC]) begin
        collecting <= 1'b1;
        seen_e     <= (zs[SYNC-1] == ZCD_EARLY);
        seen_l     <= (zs[SYNC-1] == ZCD_LATE);
      end else if (collecting) begin
        seen_e <= fin_e;
        seen_l <= fin_l;
      end
      if (dte_d[SYNC] && collecting) begin
        collecting <= 1'b0;
        samp_valid <= 1'b1;
        samp       <= reading;
        samp_state <= tag;
        if (est_req && !est_done) begin
          if (reading == ZCD_EARLY || delta_x == '1) begin
            delta_s  <= delta_x;
            est_done <= 1'b1;
          end else begin
            delta_x <= delta_x + 1'b1;
          end
        end
      end
      if (!est_req) begin         // re-arm for the next estimation
        est_done <= 1'b0;
        delta_x  <= '0;
      end
    end
  end
endmodule
