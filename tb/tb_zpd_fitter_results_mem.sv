// tb_zpd_fitter_results_mem: writes the two fitted tracks of several events,
// reads them back at 0x4000 + 8*event + 4*seed + word, and checks the link:
// after seed 1 of an event, eight 12-bit words (seed 0 words 0..3, seed 1
// words 0..3) leave on consecutive cycles starting one cycle later, tagged
// with event and word number.
module tb_zpd_fitter_results_mem;
  import zpd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  host_req_t req;
  logic sel;
  logic wr_valid, wr_seed;
  logic [5:0] wr_event;
  fit_track_t wr_track;
  fit_link_t link;
  logic [DATA_W-1:0] rdata;

  zpd_fitter_results_mem dut (.clk, .rst_n, .wr_valid, .wr_event, .wr_seed, .wr_track, .link, .req, .sel, .rdata);

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic hread(logic [15:0] addr, output logic [31:0] d);
    @(negedge clk);
    req = '0; req.addr = addr; req.re = 1'b1;
    @(negedge clk);
    d = rdata;
    req = '0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] exp_w [N_EVENT][2][4];
  int evs [4] = '{0, 9, 40, 63};

  // link monitor
  int n_link = 0, cyc = 0, seed1_cyc = 0, cur_ev = 0;
  always @(posedge clk) cyc++;
  always @(negedge clk) if (rst_n && link.valid) begin
    automatic int w = n_link % 8;
    automatic int e = evs[n_link / 8];
    check("link word number", 32'(link.word), 32'(w));
    check("link event", 32'(link.event_num), 32'(e));
    check($sformatf("link ev %0d word %0d", e, w), 32'(link.data), 32'(exp_w[e][w/4][w%4] & 16'h0FFF));
    check("link timing", 32'(cyc - seed1_cyc), 32'(w + 1));
    n_link++;
  end

  logic [31:0] d;
  initial begin
    req = '0; sel = 1'b1; wr_valid = 1'b0; wr_seed = 1'b0; wr_event = '0; wr_track = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    foreach (evs[i]) begin
      for (int s = 0; s < 2; s++) begin
        @(negedge clk);
        wr_valid = 1'b1; wr_event = 6'(evs[i]); wr_seed = 1'(s);
        wr_track = fit_track_t'({$urandom, $urandom});
        exp_w[evs[i]][s][0] = 16'(wr_track.hitmask);
        exp_w[evs[i]][s][1] = 16'(wr_track.rho) * 16'd16 + 16'(wr_track.z0err);
        exp_w[evs[i]][s][2] = 16'(wr_track.z0);
        exp_w[evs[i]][s][3] = 16'(wr_track.dip);
        if (s == 1) seed1_cyc = cyc;
      end
      @(negedge clk); wr_valid = 1'b0;
      repeat (10) @(negedge clk);
    end
    check("link words sent", 32'(n_link), 32'(8 * 4));
    foreach (evs[i])
      for (int s = 0; s < 2; s++)
        for (int w = 0; w < 4; w++) begin
          hread(16'h4000 + 16'd8 * 16'(evs[i]) + 16'd4 * 16'(s) + 16'(w), d);
          check($sformatf("ev %0d seed %0d word %0d", evs[i], s, w), d, 32'(exp_w[evs[i]][s][w]));
        end
    hread(16'h3FFF, d); check("below range", d, 0);
    hread(16'h4200, d); check("above range", d, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
