// zpd_mb_deframer: rebuilds one event's segments by superlayer and sector
// from the Megabus stream, as a Finder needs them.
//
// An event arrives in 32 clk120 ticks of five 14-bit segments. Ticks are
// taken in groups of three (group g = ticks 3g..3g+2); within a group each
// Megabus segment position carries the three segments of one SL:sector in
// consecutive ticks (slot = tick mod 3). The mapping table (zpd_pkg::mb_map)
// is the crate's: superlayers 1, 2, 3, 6 and 9 bring sectors 0..5 or 1..5,
// superlayers 4, 5, 7, 8 and 10 bring sectors 0..4 or 1..4, and ticks 30 and
// 31 carry nothing. Positions without an SL:sector are dropped.
//
// Interface: 'mb' is one Megabus beat per cycle with its event number and
// tick (the framing fields are this design's choice). When the beat with
// tick 31 has been taken, 'ev_valid' pulses for one cycle with the whole
// event on 'ev_seg', indexed [sl-1][sector][slot]; 'ev_present' marks the
// SL:sector entries the mapping fills. 'ev_seg' holds until the next event.
// A new event may start on the cycle after tick 31 (no gaps needed).
module zpd_mb_deframer
  import zpd_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  mb_beat_t    mb,
  output logic        ev_valid,
  output logic [5:0]  ev_event,
  output sl_event_t   ev_seg,
  output sl_present_t ev_present
);

  sl_event_t acc;

  // Constant: which SL:sector entries the table fills.
  always_comb begin
    slsec_t e;
    ev_present = '0;
    for (int g = 0; g < 11; g++)
      for (int s = 0; s < N_MB_SEG; s++) begin
        e = mb_map(g, s);
        if (e.valid) ev_present[e.sl-1][e.sector] = 1'b1;
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc      <= '0;
      ev_seg   <= '0;
      ev_valid <= 1'b0;
      ev_event <= '0;
    end else begin
      ev_valid <= 1'b0;
      if (mb.valid) begin
        sl_event_t nxt;
        slsec_t    e;
        int unsigned grp, slot;
        grp  = int'(mb.tick) / N_SLOT;
        slot = int'(mb.tick) % N_SLOT;
        nxt  = acc;
        for (int s = 0; s < N_MB_SEG; s++) begin
          e = mb_map(grp, s);
          if (e.valid) nxt[e.sl-1][e.sector][slot] = mb.seg[s];
        end
        acc <= nxt;
        if (mb.tick == 5'(N_TICK - 1)) begin
          ev_seg   <= nxt;
          ev_valid <= 1'b1;
          ev_event <= mb.event_num;
        end
      end
    end
  end

endmodule
