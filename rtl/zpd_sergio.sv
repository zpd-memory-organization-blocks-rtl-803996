// zpd_sergio: Sergio, the segment input/output board (block 0x0001).
//
// Sergio receives the track segments from the track segment finder, five
// 16-bit segments per clk120 tick, 32 ticks per event, and sends them on
// the Megabus to the six Finders. Only the low 14 bits of each segment
// travel on the Megabus.
//
// Inside:
//   * a tick/event counter: the tick counts the valid input beats 0..31, the
//     event number 0..63 advances after tick 31 (free-running framing is this
//     design's choice),
//   * the TSF Segment Input diagnostic memory (zpd_segment_mem, 16 bits),
//     which records every input beat at 0x4000 + 0x100*event + 0x20*seg + tick,
//   * the Megabus output register: one beat per input beat, one cycle later,
//     with the same event and tick,
//   * the DAQ memories (zpd_daq_buffer, 16 bits, 640-word circular buffer,
//     four 74-word output buffers, offset at 0x2A00). The data written into
//     the circular buffer, one word per tick, is the segment mask word
//     {event[5:0], tick[4:0], M of segments 4..0}; its layout is this design's
//     choice since the DAQ format is not defined.
//   * the common registers (version, control, status). Status is
//     {dropped accepts[7:0], daq busy, 1'b0, current event[5:0]}.
//
// Host reads return one cycle after the request.
module zpd_sergio
  import zpd_pkg::*;
#(
  parameter logic [15:0] VERSION = 16'h0100
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // segments from the track segment finder
  input  logic                       tsf_valid,
  input  logic [N_MB_SEG-1:0][15:0]  tsf_seg,
  // Megabus to the Finders
  output mb_beat_t                   mb,
  // trigger accept for the DAQ readout
  input  logic                       accept,
  output logic                       daq_done,
  output logic [1:0]                 daq_buf,
  // host bus
  input  host_req_t                  req,
  output host_rsp_t                  rsp
);

  logic        sel;
  logic [15:0] status, control;
  logic [DATA_W-1:0] rd_misc, rd_seg, rd_daq;
  logic [4:0]  tick;
  logic [5:0]  event_num;
  logic        daq_busy;
  logic [7:0]  dropped;
  logic [15:0] mask_word;

  zpd_host_port #(.ID(BLK_SERGIO), .VERSION(VERSION)) u_port (
    .clk, .rst_n, .req, .status, .sel, .control, .rdata(rd_misc)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tick      <= '0;
      event_num <= '0;
      mb        <= '0;
    end else begin
      mb.valid <= tsf_valid;
      if (tsf_valid) begin
        mb.tick      <= tick;
        mb.event_num <= event_num;
        for (int s = 0; s < N_MB_SEG; s++) mb.seg[s] <= tsf_seg[s][MB_SEG_W-1:0];
        tick <= tick + 5'd1;
        if (tick == 5'(N_TICK - 1)) event_num <= event_num + 6'd1;
      end
    end
  end

  zpd_segment_mem #(.MASK_W(16)) u_tsf_mem (
    .clk, .rst_n,
    .cap_valid(tsf_valid), .cap_event(event_num), .cap_tick(tick), .cap_seg(tsf_seg),
    .req, .sel, .rdata(rd_seg)
  );

  always_comb begin
    mask_word = {event_num, tick, 5'b0};
    for (int s = 0; s < N_MB_SEG; s++) mask_word[s] = tsf_seg[s][13];
  end

  zpd_daq_buffer #(.W(16), .CIRC_DEPTH(640), .BUF_LEN(74)) u_daq (
    .clk, .rst_n,
    .in_valid(tsf_valid), .in_data(mask_word),
    .accept, .busy(daq_busy), .done(daq_done), .done_buf(daq_buf), .dropped,
    .req, .sel, .rdata(rd_daq)
  );

  assign status = {dropped, daq_busy, 1'b0, event_num};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rsp.valid <= 1'b0;
    else        rsp.valid <= sel && req.re;
  end
  assign rsp.rdata = rd_misc | rd_seg | rd_daq;

endmodule
