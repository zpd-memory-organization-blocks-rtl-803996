// tb_zpd_mb_deframer: sends three back-to-back events of random segments on
// the Megabus and checks that every SL:sector:slot of the rebuilt event holds
// the segment sent at the Megabus segment:tick the mapping table assigns to
// it. The table is written out again here, row by row, as SL*16+sector
// (0 = empty), independently of the package function. Also checks the
// present mask (48 SL:sector entries) and that the event comes out exactly
// one cycle after its tick 31.
module tb_zpd_mb_deframer;
  import zpd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  mb_beat_t mb;
  logic ev_valid;
  logic [5:0] ev_event;
  sl_event_t ev_seg;
  sl_present_t ev_present;

  zpd_mb_deframer dut (.clk, .rst_n, .mb, .ev_valid, .ev_event, .ev_seg, .ev_present);

  // rows = tick groups 0..9, columns = Megabus segment 4,3,2,1,0
  int tbl [10][5] = '{
    '{8'h11, 8'h13, 8'h15, 8'hA1, 8'hA3},
    '{8'h12, 8'h14, 8'h10, 8'hA2, 8'hA4},
    '{8'h21, 8'h23, 8'h25, 8'h71, 8'h73},
    '{8'h22, 8'h24, 8'h20, 8'h72, 8'h74},
    '{8'h31, 8'h33, 8'h35, 8'h51, 8'h53},
    '{8'h32, 8'h34, 8'h50, 8'h52, 8'h54},
    '{8'h91, 8'h93, 8'h95, 8'h41, 8'h43},
    '{8'h92, 8'h94, 0,     8'h42, 8'h44},
    '{8'h61, 8'h63, 8'h65, 8'h81, 8'h83},
    '{8'h62, 8'h64, 0,     8'h82, 8'h84}
  };

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [13:0] sent [3][N_TICK][N_MB_SEG];
  int n_events = 0;
  int last_tick_cycle = -1, cyc = 0;
  always @(posedge clk) cyc++;

  // checker of each produced event
  always @(negedge clk) if (rst_n && ev_valid) begin
    automatic int e = n_events;
    check("event latency", 32'(cyc - last_tick_cycle), 1);
    check("event number", 32'(ev_event), 32'(6'd20 + 6'(e)));
    for (int g = 0; g < 10; g++)
      for (int c = 0; c < 5; c++) if (tbl[g][c] != 0) begin
        automatic int sl = tbl[g][c] >> 4;
        automatic int sec = tbl[g][c] & 15;
        automatic int s = 4 - c;
        for (int k = 0; k < 3; k++)
          check($sformatf("ev %0d SL%0d:%0d slot %0d", e, sl, sec, k),
                32'(ev_seg[sl-1][sec][k]), 32'(sent[e][3*g+k][s]));
      end
    n_events++;
  end

  initial begin
    int npres;
    mb = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int e = 0; e < 3; e++)
      for (int t = 0; t < N_TICK; t++) begin
        @(negedge clk);
        mb.valid = 1'b1; mb.event_num = 6'd20 + 6'(e); mb.tick = 5'(t);
        for (int s = 0; s < N_MB_SEG; s++) begin
          mb.seg[s] = 14'($urandom);
          sent[e][t][s] = mb.seg[s];
        end
        if (t == N_TICK - 1) last_tick_cycle = cyc;
      end
    @(negedge clk); mb = '0;
    repeat (5) @(negedge clk);
    check("three events", 32'(n_events), 3);
    // present mask: exactly the table entries
    npres = 0;
    for (int sl = 1; sl <= 10; sl++)
      for (int sec = 0; sec < 6; sec++) begin
        automatic bit exp = 0;
        for (int g = 0; g < 10; g++) for (int c = 0; c < 5; c++) if (tbl[g][c] == sl * 16 + sec) exp = 1;
        npres += int'(exp);
        check($sformatf("present SL%0d:%0d", sl, sec), 32'(ev_present[sl-1][sec]), 32'(exp));
      end
    check("48 SL:sector entries", 32'(npres), 48);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
