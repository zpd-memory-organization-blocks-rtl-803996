// zpd_dm_fitter_results: the Decision Module's copy of the Fitter results.
//
// Six Fitter links come in, each carrying the eight 12-bit words of an event
// (two tracks of four words, same layout as the Fitter's own memory). Every
// word is stored, zero-extended to 16 bits, in a 64-event memory per Fitter:
//     addr = 0x4000 + 0x200*fitter + 8*event + 4*seed + word   (0x4000..0x4BFF)
// which is the crate's layout. At the same time the words are gathered into
// track records. When all six Fitters have delivered an event, 'ev_valid'
// pulses for one cycle with the twelve tracks on 'ev_track'
// ([fitter][seed]); the event number is the one of Fitter 0. Waiting for
// all six is this design's choice: the Fitters run from one clock and stay
// in step, and an assertion checks that they agree on the event number.
//
// Timing: a link word is written in the cycle it arrives; 'ev_valid' comes
// the cycle after the last Fitter's word 7. Host read data one cycle after
// the request (0 when not read). Host writes are accepted (a link word to
// the same word in the same cycle wins).
module zpd_dm_fitter_results
  import zpd_pkg::*;
(
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  fit_link_t [N_FITTERS-1:0]             link,
  output logic                                  ev_valid,
  output logic [5:0]                            ev_event,
  output fit_track_t [N_FITTERS-1:0][1:0]       ev_track,
  // host side
  input  host_req_t                             req,
  input  logic                                  sel,
  output logic [DATA_W-1:0]                     rdata
);

  localparam int unsigned DEPTH = N_EVENT * 8;

  logic       in_range;
  logic [2:0] h_fit;
  logic [8:0] h_idx;

  always_comb begin
    h_fit    = req.addr[11:9];
    h_idx    = req.addr[8:0];
    in_range = sel && (req.addr[15:12] == 4'h4) && (h_fit < 3'(N_FITTERS));
  end

  logic [N_FITTERS-1:0][15:0] mem_q;
  logic [N_FITTERS-1:0]       got;       // event complete from this Fitter
  logic [N_FITTERS-1:0][5:0]  got_event;
  logic [N_FITTERS-1:0][2*FIT_WORDS-1:0][FIT_LINK_W-1:0] words;

  for (genvar f = 0; f < N_FITTERS; f++) begin : g_fit
    logic [15:0] mem [DEPTH];
    logic [8:0]  l_idx;
    assign l_idx = {link[f].event_num, link[f].word};
    always_ff @(posedge clk) begin
      if (link[f].valid)
        mem[l_idx] <= 16'(link[f].data);
      if (in_range && req.we && h_fit == 3'(f) && !(link[f].valid && l_idx == h_idx))
        mem[h_idx] <= req.wdata[15:0];
      mem_q[f] <= mem[h_idx];
    end
  end

  logic       rd_pend;
  logic [2:0] rd_fit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_pend   <= 1'b0;
      rd_fit    <= '0;
      got       <= '0;
      got_event <= '0;
      words     <= '0;
      ev_valid  <= 1'b0;
      ev_event  <= '0;
      ev_track  <= '0;
    end else begin
      logic [N_FITTERS-1:0] got_n;
      rd_pend  <= in_range && req.re;
      rd_fit   <= h_fit;
      ev_valid <= 1'b0;
      got_n    = got;
      for (int f = 0; f < N_FITTERS; f++) begin
        if (link[f].valid) begin
          words[f][link[f].word] <= link[f].data;
          if (link[f].word == 3'd7) begin
            got_n[f]     = 1'b1;
            got_event[f] <= link[f].event_num;
          end
        end
      end
      if (&got_n) begin
        got_n    = '0;
        ev_valid <= 1'b1;
        ev_event <= link[0].valid && link[0].word == 3'd7 ? link[0].event_num : got_event[0];
        for (int f = 0; f < N_FITTERS; f++)
          for (int s = 0; s < 2; s++) begin
            logic [FIT_WORDS-1:0][FIT_LINK_W-1:0] w;
            for (int k = 0; k < FIT_WORDS; k++)
              w[k] = (link[f].valid && link[f].word == 3'(s*FIT_WORDS + k))
                     ? link[f].data : words[f][s*FIT_WORDS + k];
            ev_track[f][s] <= fit_unpack(w);
          end
      end
      got <= got_n;
    end
  end

  assign rdata = rd_pend ? DATA_W'(mem_q[rd_fit]) : '0;

  // Fitters deliver the same event together.
  for (genvar f = 1; f < N_FITTERS; f++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     (link[f].valid && link[0].valid) |-> link[f].event_num == link[0].event_num)
      else $error("Fitter %0d link is not in step with Fitter 0", f);
  end

endmodule
