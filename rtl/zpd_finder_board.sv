// zpd_finder_board: one Finder board (blocks 0x0002, 0x0008, ... 0x0800).
//
// A Finder looks for track seeds in the segments of one event. The seed
// finding algorithm itself is not part of this RTL: its inputs and outputs
// are the board's ports. What the board holds around it:
//   * the Megabus diagnostic memory (zpd_segment_mem): every Megabus beat is
//     recorded at 0x4000 + 0x100*event + 0x20*seg + tick; only 14 bits are
//     kept since only 14 travel on the Megabus,
//   * the Megabus deframer (zpd_mb_deframer), which hands the algorithm the
//     event arranged by superlayer, sector and slot ('ev_*'),
//   * the Finder Results diagnostic memory (zpd_finder_results_mem), written
//     by the algorithm through 'trk_*', two tracks per event,
//   * the Finder look-up tables (zpd_lut_bank): seed phi SL conversion at
//     0x8000..0xA7FF (16 bits) and expected phi position at 0xC000..0xE7FF
//     (32 bits), read by the algorithm through 'lut_*',
//   * the common registers; status = {10'b0, event of the last deframed event}.
// ID is the board's one-hot block identifier. Host reads return one cycle
// after the request.
module zpd_finder_board
  import zpd_pkg::*;
#(
  parameter logic [BLK_W-1:0] ID      = 16'h0002,
  parameter logic [15:0]      VERSION = 16'h0100
) (
  input  logic              clk,
  input  logic              rst_n,
  input  mb_beat_t          mb,
  // event to the seed finding algorithm
  output logic              ev_valid,
  output logic [5:0]        ev_event,
  output sl_event_t         ev_seg,
  output sl_present_t       ev_present,
  // results from the algorithm
  input  logic              trk_valid,
  input  logic [5:0]        trk_event,
  input  logic              trk_seed,
  input  finder_track_t     trk,
  // look-up table read port of the algorithm
  input  logic              lut_sel,
  input  logic [15:0]       lut_idx,
  output logic [31:0]       lut_data,
  // host bus
  input  host_req_t         req,
  output host_rsp_t         rsp
);

  logic        sel;
  logic [15:0] status, control;
  logic [DATA_W-1:0] rd_misc, rd_mb, rd_res, rd_lut;
  logic [N_MB_SEG-1:0][15:0] mb_seg16;

  zpd_host_port #(.ID(ID), .VERSION(VERSION)) u_port (
    .clk, .rst_n, .req, .status, .sel, .control, .rdata(rd_misc)
  );

  always_comb
    for (int s = 0; s < N_MB_SEG; s++) mb_seg16[s] = 16'(mb.seg[s]);

  zpd_segment_mem #(.MASK_W(MB_SEG_W)) u_mb_mem (
    .clk, .rst_n,
    .cap_valid(mb.valid), .cap_event(mb.event_num), .cap_tick(mb.tick), .cap_seg(mb_seg16),
    .req, .sel, .rdata(rd_mb)
  );

  zpd_mb_deframer u_deframer (
    .clk, .rst_n, .mb, .ev_valid, .ev_event, .ev_seg, .ev_present
  );

  zpd_finder_results_mem u_results (
    .clk, .rst_n,
    .wr_valid(trk_valid), .wr_event(trk_event), .wr_seed(trk_seed), .wr_track(trk),
    .req, .sel, .rdata(rd_res)
  );

  zpd_lut_bank #(
    .N(2),
    .BASE({16'hC000, 16'h8000}),
    .LAST({16'hE7FF, 16'hA7FF}),
    .WIDE(2'b10)
  ) u_luts (
    .clk, .rst_n, .lut_sel, .lut_idx, .lut_data, .req, .sel, .rdata(rd_lut)
  );

  assign status = {10'b0, ev_event};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rsp.valid <= 1'b0;
    else        rsp.valid <= sel && req.re;
  end
  assign rsp.rdata = rd_misc | rd_mb | rd_res | rd_lut;

endmodule
