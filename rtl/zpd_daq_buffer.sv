// zpd_daq_buffer: DAQ readout memories of Sergio and the Decision Module.
//
// Every board output that the data acquisition may want is written, one
// word per cycle, into a circular buffer that always holds the most recent
// CIRC_DEPTH words. When the trigger accepts an event ('accept'), BUF_LEN
// words are copied from the circular buffer, starting OFFSET words behind
// its write pointer, into the next of four output buffers (0,1,2,3,0,...).
// The offset register bridges the trigger latency: it is the distance
// between the circular buffer's pointer and the DAQ readout pointer.
//
// Host map (Sergio defaults shown, Decision Module in brackets):
//   0x2000 + 0x100*k + i   output buffer k, word i < BUF_LEN  74 [200] words
//   0x2400 + i             circular buffer, i < CIRC_DEPTH   640 [832] words
//   0x2A00                 offset, read/write
// Buffers and the circular buffer are read only. Widths are 16 [32] bits.
// The map, sizes and widths are the crate's. The copy engine, the round
// robin over the four buffers and the handling of an accept that arrives
// while a copy is running (it is dropped and counted) are this design's
// choices, since the readout protocol is not defined.
//
// Timing: the copy takes BUF_LEN+1 cycles after 'accept'; 'done' pulses for
// one cycle at the end with the filled buffer's number on 'done_buf'. Host
// read data returns one cycle after the request (0 when not read).
module zpd_daq_buffer
  import zpd_pkg::*;
#(
  parameter int unsigned W          = 16,
  parameter int unsigned CIRC_DEPTH = 640,
  parameter int unsigned BUF_LEN    = 74
) (
  input  logic              clk,
  input  logic              rst_n,
  // data stream
  input  logic              in_valid,
  input  logic [W-1:0]      in_data,
  // trigger
  input  logic              accept,
  output logic              busy,
  output logic              done,
  output logic [1:0]        done_buf,
  output logic [7:0]        dropped,
  // host side
  input  host_req_t         req,
  input  logic              sel,
  output logic [DATA_W-1:0] rdata
);

  localparam int unsigned PW = $clog2(CIRC_DEPTH);
  localparam int unsigned LW = $clog2(BUF_LEN + 1);

  logic [W-1:0] circ [CIRC_DEPTH];
  logic [W-1:0] obuf [4][BUF_LEN];

  logic [PW-1:0] wptr;
  logic [15:0]   offset;

  // --------------------------------------------------------- host decoding
  logic        buf_hit, circ_hit, off_hit;
  logic [1:0]  h_buf;
  logic [7:0]  h_i;
  logic [15:0] h_ci;

  always_comb begin
    h_buf    = req.addr[9:8];
    h_i      = req.addr[7:0];
    h_ci     = req.addr - 16'h2400;
    buf_hit  = sel && req.addr[15:10] == 6'b001000 && 32'(h_i) < BUF_LEN;
    circ_hit = sel && req.addr >= 16'h2400 && 32'(h_ci) < CIRC_DEPTH;
    off_hit  = sel && req.addr == 16'h2A00;
  end

  // --------------------------------------------------------- copy engine
  logic [PW-1:0] rptr;
  logic [LW-1:0] cnt;
  logic [1:0]    cur_buf;
  logic          cp_we;
  logic [LW-1:0] cp_idx;
  logic [W-1:0]  cp_data;

  function automatic logic [PW-1:0] circ_sub(logic [PW-1:0] p, logic [15:0] d);
    int unsigned dd, r;
    dd = int'(d) % CIRC_DEPTH;
    r  = (int'(p) + CIRC_DEPTH - dd) % CIRC_DEPTH;
    return PW'(r);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr     <= '0;
      offset   <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
      done_buf <= '0;
      dropped  <= '0;
      rptr     <= '0;
      cnt      <= '0;
      cur_buf  <= '0;
      cp_we    <= 1'b0;
      cp_idx   <= '0;
      cp_data  <= '0;
    end else begin
      done  <= 1'b0;
      cp_we <= 1'b0;
      if (in_valid)
        wptr <= (32'(wptr) == CIRC_DEPTH - 1) ? '0 : wptr + 1'b1;
      if (off_hit && req.we)
        offset <= req.wdata[15:0];
      if (accept && busy && dropped != 8'hFF)
        dropped <= dropped + 8'd1;
      if (!busy && accept) begin
        busy <= 1'b1;
        rptr <= circ_sub(wptr, offset);
        cnt  <= '0;
      end else if (busy) begin
        // read one word of the circular buffer, write it one cycle later
        cp_we   <= 1'b1;
        cp_idx  <= cnt;
        cp_data <= circ[rptr];
        rptr    <= (32'(rptr) == CIRC_DEPTH - 1) ? '0 : rptr + 1'b1;
        cnt     <= cnt + 1'b1;
        if (32'(cnt) == BUF_LEN - 1) busy <= 1'b0;
      end
      if (cp_we && 32'(cp_idx) == BUF_LEN - 1) begin
        done     <= 1'b1;
        done_buf <= cur_buf;
        cur_buf  <= cur_buf + 2'd1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) circ[wptr] <= in_data;
    if (cp_we)    obuf[cur_buf][cp_idx] <= cp_data;
  end

  // --------------------------------------------------------- host reads
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rdata <= '0;
    else begin
      rdata <= '0;
      if (req.re) begin
        if (buf_hit)       rdata <= DATA_W'(obuf[h_buf][h_i[$clog2(BUF_LEN)-1:0]]);
        else if (circ_hit) rdata <= DATA_W'(circ[h_ci[PW-1:0]]);
        else if (off_hit)  rdata <= DATA_W'(offset);
      end
    end
  end

endmodule
