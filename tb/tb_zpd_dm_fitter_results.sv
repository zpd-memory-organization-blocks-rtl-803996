// tb_zpd_dm_fitter_results: drives the six Fitter links with two events,
// each Fitter starting a different number of cycles late, and checks that
// the twelve tracks are handed on exactly once per event, one cycle after
// the last Fitter's last word, with the right fields; then reads the stored
// words back at 0x4000 + 0x200*fitter + 8*event + word.
module tb_zpd_dm_fitter_results;
  import zpd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  host_req_t req;
  logic sel;
  fit_link_t [N_FITTERS-1:0] link;
  logic ev_valid;
  logic [5:0] ev_event;
  fit_track_t [N_FITTERS-1:0][1:0] ev_track;
  logic [DATA_W-1:0] rdata;

  zpd_dm_fitter_results dut (.clk, .rst_n, .link, .ev_valid, .ev_event, .ev_track, .req, .sel, .rdata);

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

  logic [11:0] words [2][N_FITTERS][8];
  int evnum [2] = '{12, 13};
  int n_ev = 0, cyc = 0, last_cyc = 0;
  always @(posedge clk) cyc++;

  always @(negedge clk) if (rst_n && ev_valid) begin
    automatic int e = n_ev;
    check("handover latency", 32'(cyc - last_cyc), 1);
    check("event number", 32'(ev_event), 32'(evnum[e]));
    for (int f = 0; f < N_FITTERS; f++)
      for (int s = 0; s < 2; s++) begin
        check("hitmask", 32'(ev_track[f][s].hitmask), 32'(words[e][f][4*s][9:0]));
        check("rho",     32'(ev_track[f][s].rho),     32'(words[e][f][4*s+1] >> 4));
        check("z0err",   32'(ev_track[f][s].z0err),   32'(words[e][f][4*s+1] & 12'hF));
        check("z0",      32'(ev_track[f][s].z0),      32'(words[e][f][4*s+2] & 12'hFF));
        check("dip",     32'(ev_track[f][s].dip),     32'(words[e][f][4*s+3] & 12'hFF));
      end
    n_ev++;
  end

  logic [31:0] d;
  initial begin
    req = '0; sel = 1'b1; link = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int e = 0; e < 2; e++) begin
      for (int f = 0; f < N_FITTERS; f++)
        for (int w = 0; w < 8; w++) words[e][f][w] = 12'($urandom);
      // Fitter f starts f cycles late: 8 + 5 cycles in all
      for (int c = 0; c < 8 + N_FITTERS - 1; c++) begin
        @(negedge clk);
        for (int f = 0; f < N_FITTERS; f++) begin
          automatic int w = c - f;
          link[f] = '0;
          if (w >= 0 && w < 8) begin
            link[f].valid = 1'b1; link[f].event_num = 6'(evnum[e]);
            link[f].word = 3'(w); link[f].data = words[e][f][w];
          end
        end
        last_cyc = cyc;
      end
      @(negedge clk); link = '0;
      repeat (4) @(negedge clk);
      check("one handover per event", 32'(n_ev), 32'(e + 1));
    end
    for (int e = 0; e < 2; e++)
      for (int f = 0; f < N_FITTERS; f++)
        for (int w = 0; w < 8; w++) begin
          hread(16'h4000 + 16'h200 * 16'(f) + 16'd8 * 16'(evnum[e]) + 16'(w), d);
          check($sformatf("mem f%0d e%0d w%0d", f, evnum[e], w), d, 32'(words[e][f][w]));
        end
    hread(16'h4C00, d); check("above range", d, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
