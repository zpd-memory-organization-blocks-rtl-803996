// tb_zpd_finder_results_mem: writes random seed tracks for several events
// and reads every word back at 0x1000 + 0x20*event + 0x10*seed + word,
// comparing with the record layout (word 0 hitmask, word 1 {dipbin,rhobin},
// words 2..11 segphi SL1..10, words 12..15 zero). Also host writes and
// out-of-range reads.
module tb_zpd_finder_results_mem;
  import zpd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  host_req_t req;
  logic sel;
  logic wr_valid, wr_seed;
  logic [5:0] wr_event;
  finder_track_t wr_track;
  logic [DATA_W-1:0] rdata;

  zpd_finder_results_mem dut (.clk, .rst_n, .wr_valid, .wr_event, .wr_seed, .wr_track, .req, .sel, .rdata);

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

  // expected words kept as plain numbers
  logic [15:0] exp_w [N_EVENT][2][16];
  int evs [5] = '{0, 7, 31, 32, 63};

  logic [31:0] d;
  initial begin
    req = '0; sel = 1'b1; wr_valid = 1'b0; wr_seed = 1'b0; wr_event = '0; wr_track = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    foreach (evs[i])
      for (int s = 0; s < 2; s++) begin
        @(negedge clk);
        wr_valid = 1'b1; wr_event = 6'(evs[i]); wr_seed = 1'(s);
        wr_track.hitmask = 10'($urandom);
        wr_track.dipbin  = 6'($urandom);
        wr_track.rhobin  = 6'($urandom);
        for (int k = 0; k < 10; k++) wr_track.segphi[k] = 16'($urandom);
        exp_w[evs[i]][s][0] = 16'(wr_track.hitmask);
        exp_w[evs[i]][s][1] = 16'(wr_track.dipbin) * 16'd64 + 16'(wr_track.rhobin);
        for (int k = 0; k < 10; k++) exp_w[evs[i]][s][2+k] = wr_track.segphi[k];
        for (int k = 12; k < 16; k++) exp_w[evs[i]][s][k] = 16'h0;
      end
    @(negedge clk); wr_valid = 1'b0;
    foreach (evs[i])
      for (int s = 0; s < 2; s++)
        for (int w = 0; w < 16; w++) begin
          hread(16'h1000 + 16'h20 * 16'(evs[i]) + 16'h10 * 16'(s) + 16'(w), d);
          check($sformatf("ev %0d seed %0d word %0d", evs[i], s, w), d, 32'(exp_w[evs[i]][s][w]));
        end
    // host write to word 5 of event 7 seed 1
    @(negedge clk);
    req = '0; req.addr = 16'h1000 + 16'h20 * 7 + 16'h10 + 5; req.wdata = 32'h0000_4242; req.we = 1'b1;
    @(negedge clk); req = '0;
    hread(16'h10F5, d); check("host write", d, 32'h4242);
    hread(16'h10F4, d); check("neighbour untouched", d, 32'(exp_w[7][1][4]));
    hread(16'h0FFF, d); check("below range", d, 0);
    hread(16'h1800, d); check("above range", d, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
