// tb_zpd_decision: loads random selection windows for the eight decision
// bits and both track types through the host registers (0x0xy0..0x0xy6),
// reads them back, then presents 300 random events of twelve tracks and
// compares the decision bits with a reference computed here. Checks the
// Output memory (0x3000 + event), the 4-bit mask register at 0x0F0 and the
// one-cycle decision latency. Counts how many bits fired and how many
// A10-only and A7-only firings occurred, and fails if either never happens.
module tb_zpd_decision;
  import zpd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  host_req_t req;
  logic sel;
  logic ev_valid, dec_valid;
  logic [5:0] ev_event, dec_event;
  fit_track_t [N_FITTERS-1:0][1:0] ev_track;
  logic [N_DECISION-1:0] dec_bits;
  logic [3:0] mask;
  logic [DATA_W-1:0] rdata;

  zpd_decision dut (.clk, .rst_n, .ev_valid, .ev_event, .ev_track, .dec_valid, .dec_event,
                    .dec_bits, .mask, .req, .sel, .rdata);

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic hwrite(logic [15:0] addr, logic [31:0] dd);
    @(negedge clk);
    req = '0; req.addr = addr; req.wdata = dd; req.we = 1'b1;
    @(negedge clk);
    req = '0;
  endtask

  task automatic hread(logic [15:0] addr, output logic [31:0] d);
    @(negedge clk);
    req = '0; req.addr = addr; req.re = 1'b1;
    @(negedge clk);
    d = rdata;
    req = '0;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // windows: [bit][type][field 0..6]
  int lim [8][2][7];
  logic [7:0] out_exp [64];

  function automatic logic [7:0] ref_bits(fit_track_t [N_FITTERS-1:0][1:0] t, output bit a10, output bit a7);
    logic [7:0] r = '0;
    a10 = 0; a7 = 0;
    for (int x = 0; x < 8; x++)
      for (int f = 0; f < 6; f++)
        for (int s = 0; s < 2; s++) begin
          automatic int y = (f >= 3) ? 1 : 0;
          automatic fit_track_t k = t[f][s];
          if (k.hitmask != 0 &&
              int'(k.rho) >= lim[x][y][0] && int'(k.rho) <= lim[x][y][1] &&
              int'(k.dip) >= lim[x][y][2] && int'(k.dip) <= lim[x][y][3] &&
              int'(k.z0)  >= lim[x][y][4] && int'(k.z0)  <= lim[x][y][5] &&
              int'(k.z0err) <= lim[x][y][6]) begin
            r[x] = 1'b1;
            if (y == 0) a10 = 1; else a7 = 1;
          end
        end
    return r;
  endfunction

  int fired = 0, a10_fired = 0, a7_fired = 0;
  logic [31:0] d;
  initial begin
    req = '0; sel = 1'b1; ev_valid = 1'b0; ev_event = '0; ev_track = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int x = 0; x < 8; x++)
      for (int y = 0; y < 2; y++) begin
        for (int k = 0; k < 3; k++) begin
          lim[x][y][2*k]   = $urandom_range(0, 100);
          lim[x][y][2*k+1] = lim[x][y][2*k] + $urandom_range(60, 155);
        end
        lim[x][y][6] = $urandom_range(4, 15);
        for (int k = 0; k < 7; k++)
          hwrite(16'(x + 1) * 16'h100 + 16'(y) * 16'h10 + 16'(k), 32'(lim[x][y][k]));
      end
    for (int x = 0; x < 8; x++)
      for (int y = 0; y < 2; y++)
        for (int k = 0; k < 7; k++) begin
          hread(16'(x + 1) * 16'h100 + 16'(y) * 16'h10 + 16'(k), d);
          check($sformatf("window %0d %0d %0d", x + 1, y, k), d, 32'(lim[x][y][k]));
        end
    hwrite(16'h00F0, 32'hA);
    hread(16'h00F0, d); check("mask reg", d, 32'hA);
    check("mask port", 32'(mask), 32'hA);
    hread(16'h0107, d); check("unused window word", d, 0);

    for (int n = 0; n < 300; n++) begin
      logic [7:0] exp_b;
      bit a10, a7;
      @(negedge clk);
      ev_valid = 1'b1; ev_event = 6'(n);
      for (int f = 0; f < 6; f++)
        for (int s = 0; s < 2; s++) begin
          ev_track[f][s] = fit_track_t'({$urandom, $urandom});
          if ($urandom_range(0, 3) == 0) ev_track[f][s].hitmask = '0;
        end
      exp_b = ref_bits(ev_track, a10, a7);
      out_exp[n % 64] = exp_b;
      @(negedge clk);
      ev_valid = 1'b0;
      check("dec_valid", 32'(dec_valid), 1);
      check("dec_event", 32'(dec_event), 32'(n % 64));
      check($sformatf("event %0d bits", n), 32'(dec_bits), 32'(exp_b));
      fired += $countones(exp_b);
      a10_fired += int'(a10 && !a7);
      a7_fired += int'(a7 && !a10);
    end
    for (int e = 0; e < 64; e++) begin
      hread(16'h3000 + 16'(e), d);
      check($sformatf("output mem %0d", e), d, 32'(out_exp[e]));
    end
    $display("decision bits fired %0d, A10-only events %0d, A7-only events %0d", fired, a10_fired, a7_fired);
    checks++; if (fired == 0 || fired == 300 * 8) failures++;
    checks++; if (a10_fired == 0) failures++;
    checks++; if (a7_fired == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
