// zpd_decision: the Decision Module's trigger decision, its selection
// windows and its Output diagnostic memory.
//
// For every event the module receives the twelve fitted tracks (two from
// each of six Fitters). Tracks from Fitters 0..2 are A10 tracks (type y=0),
// from Fitters 3..5 A7 tracks (y=1). Decision bit x (x = 1..8) fires when at
// least one track with a non-zero hitmask lies inside all windows of bit x
// for its type:
//     rho_min    <= rho   <= rho_max
//     tandip_min <= dip   <= tandip_max
//     z0_min     <= z0    <= z0_max
//                   z0err <= z0err_max
// The windows are host registers at 0x0xy0..0x0xy6 (x = bit, y = type), in
// the order above, 8 bits each (z0err_max 4 bits); all reset to 0. A 4-bit
// mask register sits at 0x0F0; it is held and brought out on 'mask' but not
// used here, as its role in the decision is not defined.
// The register map is the crate's. Reading the fields as unsigned codes,
// inclusive limits, the OR over tracks and the hitmask!=0 validity test are
// this design's choices.
//
// Output memory: the decision of event e is written to 0x3000 + e
// (0x3000..0x303F), bit x-1 holding decision bit x.
//
// Timing: 'dec_valid' and 'dec_bits' follow 'ev_valid' by one cycle, and
// the Output word is written in that same cycle. Host reads return one
// cycle after the request (0 when not read).
module zpd_decision
  import zpd_pkg::*;
(
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              ev_valid,
  input  logic [5:0]                        ev_event,
  input  fit_track_t [N_FITTERS-1:0][1:0]   ev_track,
  output logic                              dec_valid,
  output logic [5:0]                        dec_event,
  output logic [N_DECISION-1:0]             dec_bits,
  output logic [3:0]                        mask,
  // host side
  input  host_req_t                         req,
  input  logic                              sel,
  output logic [DATA_W-1:0]                 rdata
);

  window_t win [N_DECISION][2];
  logic [7:0] out_mem [N_EVENT];

  // ------------------------------------------------------ host decoding
  logic       win_hit, mask_hit, out_hit;
  logic [3:0] h_x;
  logic       h_y;
  logic [3:0] h_k;

  always_comb begin
    h_x      = req.addr[11:8];
    h_y      = req.addr[4];
    h_k      = req.addr[3:0];
    win_hit  = sel && req.addr[15:12] == 4'h0 && h_x >= 4'd1 && h_x <= 4'(N_DECISION)
               && req.addr[7:5] == 3'b0 && h_k <= 4'd6;
    mask_hit = sel && req.addr == 16'h00F0;
    out_hit  = sel && req.addr[15:6] == 10'(16'h3000 >> 6);
  end

  function automatic logic [7:0] win_field(window_t w, logic [3:0] k);
    case (k)
      4'd0:    return w.rho_min;
      4'd1:    return w.rho_max;
      4'd2:    return w.tandip_min;
      4'd3:    return w.tandip_max;
      4'd4:    return w.z0_min;
      4'd5:    return w.z0_max;
      default: return {4'b0, w.z0err_max};
    endcase
  endfunction

  // ------------------------------------------------------ decision
  function automatic logic in_window(fit_track_t t, window_t w);
    return (t.hitmask != '0)
        && (t.rho >= w.rho_min)    && (t.rho <= w.rho_max)
        && (t.dip >= w.tandip_min) && (t.dip <= w.tandip_max)
        && (t.z0  >= w.z0_min)     && (t.z0  <= w.z0_max)
        && (t.z0err <= w.z0err_max);
  endfunction

  logic [N_DECISION-1:0] bits_c;

  always_comb begin
    bits_c = '0;
    for (int x = 0; x < N_DECISION; x++)
      for (int f = 0; f < N_FITTERS; f++)
        for (int s = 0; s < 2; s++)
          if (in_window(ev_track[f][s], win[x][(f < N_A10) ? 0 : 1])) bits_c[x] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int x = 0; x < N_DECISION; x++) begin
        win[x][0] <= '0;
        win[x][1] <= '0;
      end
      mask      <= '0;
      dec_valid <= 1'b0;
      dec_event <= '0;
      dec_bits  <= '0;
      rdata     <= '0;
    end else begin
      dec_valid <= ev_valid;
      if (ev_valid) begin
        dec_event <= ev_event;
        dec_bits  <= bits_c;
      end
      if (win_hit && req.we) begin
        case (h_k)
          4'd0: win[h_x-1][h_y].rho_min    <= req.wdata[7:0];
          4'd1: win[h_x-1][h_y].rho_max    <= req.wdata[7:0];
          4'd2: win[h_x-1][h_y].tandip_min <= req.wdata[7:0];
          4'd3: win[h_x-1][h_y].tandip_max <= req.wdata[7:0];
          4'd4: win[h_x-1][h_y].z0_min     <= req.wdata[7:0];
          4'd5: win[h_x-1][h_y].z0_max     <= req.wdata[7:0];
          default: win[h_x-1][h_y].z0err_max <= req.wdata[3:0];
        endcase
      end
      if (mask_hit && req.we) mask <= req.wdata[3:0];
      rdata <= '0;
      if (req.re) begin
        if (win_hit)       rdata <= DATA_W'(win_field(win[h_x-1][h_y], h_k));
        else if (mask_hit) rdata <= DATA_W'(mask);
        else if (out_hit)  rdata <= DATA_W'(out_mem[req.addr[5:0]]);
      end
    end
  end

  // Output memory: decisions have priority over host writes.
  always_ff @(posedge clk) begin
    if (ev_valid)
      out_mem[ev_event] <= bits_c;
    if (out_hit && req.we && !(ev_valid && ev_event == req.addr[5:0]))
      out_mem[req.addr[5:0]] <= req.wdata[7:0];
  end

endmodule
