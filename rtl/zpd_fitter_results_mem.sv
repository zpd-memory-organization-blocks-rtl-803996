// zpd_fitter_results_mem: Fitter Results diagnostic memory and the link
// that sends the same results to the Decision Module.
//
// A Fitter fits the two seed tracks of each event. Each fitted track is a
// 4-word record:
//     addr = 0x4000 + 8*event + 4*seed + word      (0x4000..0x41FF, 64 events)
//     word 0  hitmask[9:0]
//     word 1  {rho[7:0], z0err[3:0]}
//     word 2  z0[7:0]
//     word 3  dip[7:0]
// Layout and fields follow the crate's memory map. The four words are four
// banks of 128 words, so a whole track is written in one cycle.
//
// Link: only the low 12 bits of each word travel to the Decision Module.
// Once seed 1 of an event is written, the eight words of the event (seed 0
// words 0..3, then seed 1 words 0..3) leave on 'link', one word per cycle,
// each tagged with its event and word number. Seed 0 is latched when it is
// written. Word-serial transfer, its tags and the "seed 1 completes the
// event" rule are this design's choices; the crate only fixes the words and
// their 12-bit width. An event must not complete while the previous one is
// still being sent (8 cycles; events are 32 cycles apart).
//
// Timing: host read data one cycle after the request (0 when not read).
// The first link word leaves the cycle after seed 1 is written.
module zpd_fitter_results_mem
  import zpd_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // Fitter side
  input  logic              wr_valid,
  input  logic [5:0]        wr_event,
  input  logic              wr_seed,
  input  fit_track_t        wr_track,
  // link to the Decision Module
  output fit_link_t         link,
  // host side
  input  host_req_t         req,
  input  logic              sel,
  output logic [DATA_W-1:0] rdata
);

  localparam int unsigned DEPTH = N_EVENT * 2;

  logic       in_range;
  logic [6:0] h_idx, w_idx;
  logic [1:0] h_word;
  logic [FIT_WORDS-1:0][15:0] w_words;

  always_comb begin
    in_range = sel && (req.addr[15:9] == 7'b0100000);
    h_idx    = {req.addr[8:3], req.addr[2]};
    h_word   = req.addr[1:0];
    w_idx    = {wr_event, wr_seed};
    w_words  = fit_words(wr_track);
  end

  logic [FIT_WORDS-1:0][15:0] bank_q;

  for (genvar b = 0; b < FIT_WORDS; b++) begin : g_bank
    logic [15:0] mem [DEPTH];
    always_ff @(posedge clk) begin
      if (wr_valid)
        mem[w_idx] <= w_words[b];
      if (in_range && req.we && h_word == 2'(b) && !(wr_valid && w_idx == h_idx))
        mem[h_idx] <= req.wdata[15:0];
      bank_q[b] <= mem[h_idx];
    end
  end

  logic       rd_pend;
  logic [1:0] rd_word;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_pend <= 1'b0;
      rd_word <= '0;
    end else begin
      rd_pend <= in_range && req.re;
      rd_word <= h_word;
    end
  end

  assign rdata = rd_pend ? DATA_W'(bank_q[rd_word]) : '0;

  // ------------------------------------------------------------------ link
  logic [2*FIT_WORDS-1:0][FIT_LINK_W-1:0] tx_words;
  logic [FIT_WORDS-1:0][FIT_LINK_W-1:0]   seed0_words;
  logic [5:0] tx_event;
  logic [2:0] tx_cnt;
  logic       tx_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seed0_words <= '0;
      tx_words    <= '0;
      tx_event    <= '0;
      tx_cnt      <= '0;
      tx_busy     <= 1'b0;
    end else begin
      if (tx_busy) begin
        tx_cnt <= tx_cnt + 3'd1;
        if (tx_cnt == 3'd7) tx_busy <= 1'b0;
      end
      if (wr_valid && !wr_seed)
        for (int i = 0; i < FIT_WORDS; i++) seed0_words[i] <= w_words[i][FIT_LINK_W-1:0];
      if (wr_valid && wr_seed) begin
        for (int i = 0; i < FIT_WORDS; i++) begin
          tx_words[i]             <= seed0_words[i];
          tx_words[FIT_WORDS + i] <= w_words[i][FIT_LINK_W-1:0];
        end
        tx_event <= wr_event;
        tx_cnt   <= '0;
        tx_busy  <= 1'b1;
      end
    end
  end

  always_comb begin
    link.valid     = tx_busy;
    link.event_num = tx_event;
    link.word      = tx_cnt;
    link.data      = tx_words[tx_cnt];
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   (wr_valid && wr_seed) |-> !tx_busy || tx_cnt == 3'd7)
    else $error("fitter link: event completed while the previous one is still being sent");

endmodule
