// zpd_finder_results_mem: Finder Results diagnostic memory.
//
// A Finder produces two seed tracks per event (seed 0 and seed 1). Each is
// kept as a 16-word record:
//     addr = 0x1000 + 0x20*event + 0x10*seed + word
//     word 0      hitmask[9:0]   superlayers with a hit
//     word 1      {dipbin[5:0], rhobin[5:0]}
//     word 2..11  segment phi of superlayer 1..10
//     word 12..15 unused, read as 0
// The last 64 events are held (0x1000..0x17FB). Address layout and word
// contents follow the crate's memory map. The segphi words are stored with
// all 16 bits, since their width is not fixed there.
//
// The twelve used words of a record are twelve banks of 128 words, so the
// Finder writes a whole track in one cycle ('wr_valid'); one track per
// cycle, two per event. A host write changes one word; a track write to the
// same record in the same cycle wins.
//
// Timing: host read data is registered, one cycle after the request; 0 when
// this memory was not read.
module zpd_finder_results_mem
  import zpd_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // Finder side
  input  logic              wr_valid,
  input  logic [5:0]        wr_event,
  input  logic              wr_seed,
  input  finder_track_t     wr_track,
  // host side
  input  host_req_t         req,
  input  logic              sel,
  output logic [DATA_W-1:0] rdata
);

  localparam int unsigned DEPTH = N_EVENT * 2;

  logic       in_range;
  logic [6:0] h_idx, w_idx;
  logic [3:0] h_word;
  logic [FND_WORDS-1:0][15:0] w_words;

  always_comb begin
    in_range = sel && (req.addr[15:11] == 5'b00010);
    h_idx    = {req.addr[10:5], req.addr[4]};
    h_word   = req.addr[3:0];
    w_idx    = {wr_event, wr_seed};
    w_words  = finder_words(wr_track);
  end

  logic [FND_WORDS-1:0][15:0] bank_q;

  for (genvar b = 0; b < FND_WORDS; b++) begin : g_bank
    logic [15:0] mem [DEPTH];
    always_ff @(posedge clk) begin
      if (wr_valid)
        mem[w_idx] <= w_words[b];
      if (in_range && req.we && h_word == 4'(b) && !(wr_valid && w_idx == h_idx))
        mem[h_idx] <= req.wdata[15:0];
      bank_q[b] <= mem[h_idx];
    end
  end

  logic       rd_pend;
  logic [3:0] rd_word;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_pend <= 1'b0;
      rd_word <= '0;
    end else begin
      rd_pend <= in_range && req.re;
      rd_word <= h_word;
    end
  end

  always_comb begin
    rdata = '0;
    if (rd_pend && rd_word < 4'(FND_WORDS)) rdata = DATA_W'(bank_q[rd_word]);
  end

endmodule
