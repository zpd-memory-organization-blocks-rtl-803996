// zpd_segment_mem: segment diagnostic memory (TSF Segment Input on Sergio,
// Megabus diagnostic memory on each Finder).
//
// It keeps the segments of the last 64 events in the order they travel on
// the Megabus: 32 clk120 ticks of 5 segments per event. The host sees it at
//     addr = 0x4000 + 0x100*event + 0x20*segment + tick
// i.e. 0x4000..0x7F9F; the words XXA0..XXFF of each event page (segment
// fields 5..7) are reserved and read as 0xBADD. The memory is 16 bits wide;
// on the Megabus side only the low 14 bits carry data (MASK_W = 14 clears
// the two upper bits on capture).
//
// The five segments of a tick are written in one cycle, so the memory is
// built as five banks, one per Megabus segment, each 64 events x 32 ticks.
// The capture port has priority over a host write to the same word (host
// writes are allowed: the diagnostic memories are not listed as read only).
//
// Timing: capture writes in the cycle 'cap_valid' is high. Host read data is
// registered and returned one cycle after the request; 'rdata' is 0 when no
// word of this memory was read.
module zpd_segment_mem
  import zpd_pkg::*;
#(
  parameter int unsigned MASK_W = 16     // low bits kept from each captured segment
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // capture side
  input  logic                        cap_valid,
  input  logic [5:0]                  cap_event,
  input  logic [4:0]                  cap_tick,
  input  logic [N_MB_SEG-1:0][15:0]   cap_seg,
  // host side
  input  host_req_t                   req,
  input  logic                        sel,
  output logic [DATA_W-1:0]           rdata
);

  localparam int unsigned DEPTH = N_EVENT * N_TICK;

  logic        in_range;
  logic [2:0]  h_seg;
  logic [10:0] h_idx;
  logic [10:0] c_idx;

  always_comb begin
    in_range = sel && (req.addr[15:14] == 2'b01);
    h_seg    = req.addr[7:5];
    h_idx    = {req.addr[13:8], req.addr[4:0]};
    c_idx    = {cap_event, cap_tick};
  end

  logic [N_MB_SEG-1:0][15:0] bank_q;

  for (genvar b = 0; b < N_MB_SEG; b++) begin : g_bank
    logic [15:0] mem [DEPTH];
    logic        cap_hits;
    assign cap_hits = cap_valid && (c_idx == h_idx);
    always_ff @(posedge clk) begin
      if (cap_valid)
        mem[c_idx] <= cap_seg[b] & 16'((1 << MASK_W) - 1);
      if (in_range && req.we && h_seg == 3'(b) && !cap_hits)
        mem[h_idx] <= req.wdata[15:0];
      bank_q[b] <= mem[h_idx];
    end
  end

  logic       rd_pend;
  logic [2:0] rd_seg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_pend <= 1'b0;
      rd_seg  <= '0;
    end else begin
      rd_pend <= in_range && req.re;
      rd_seg  <= h_seg;
    end
  end

  always_comb begin
    rdata = '0;
    if (rd_pend) begin
      if (rd_seg >= 3'(N_MB_SEG)) rdata = DATA_W'(BADD);
      else                        rdata = DATA_W'(bank_q[rd_seg]);
    end
  end

endmodule
