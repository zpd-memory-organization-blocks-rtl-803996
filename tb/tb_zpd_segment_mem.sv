// tb_zpd_segment_mem: fills the segment memory through the capture port for
// several events with random segments, then reads back through the host
// port at 0x4000 + 0x100*event + 0x20*seg + tick and compares with a model.
// Also checks the 0xBADD reserved words, the 14-bit mask variant is covered
// by the board testbench, host writes, capture priority and read latency.
module tb_zpd_segment_mem;
  import zpd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  host_req_t req;
  logic cap_valid;
  logic [5:0] cap_event;
  logic [4:0] cap_tick;
  logic [N_MB_SEG-1:0][15:0] cap_seg;
  logic [DATA_W-1:0] rdata;
  logic sel;

  zpd_segment_mem #(.MASK_W(16)) dut (
    .clk, .rst_n, .cap_valid, .cap_event, .cap_tick, .cap_seg, .req, .sel, .rdata
  );

  logic [15:0] model [N_EVENT][N_MB_SEG][N_TICK];

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

  task automatic hwrite(logic [15:0] addr, logic [31:0] dd);
    @(negedge clk);
    req = '0; req.addr = addr; req.wdata = dd; req.we = 1'b1;
    @(negedge clk);
    req = '0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] d;
  int ev_list [4] = '{0, 1, 37, 63};
  initial begin
    req = '0; sel = 1'b1; cap_valid = 1'b0; cap_event = '0; cap_tick = '0; cap_seg = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // capture 4 events, 32 ticks each
    foreach (ev_list[i]) begin
      for (int t = 0; t < N_TICK; t++) begin
        @(negedge clk);
        cap_valid = 1'b1; cap_event = 6'(ev_list[i]); cap_tick = 5'(t);
        for (int s = 0; s < N_MB_SEG; s++) begin
          cap_seg[s] = 16'($urandom);
          model[ev_list[i]][s][t] = cap_seg[s];
        end
      end
    end
    @(negedge clk); cap_valid = 1'b0;
    // read back every word of those events
    foreach (ev_list[i])
      for (int s = 0; s < N_MB_SEG; s++)
        for (int t = 0; t < N_TICK; t++) begin
          hread(16'h4000 + 16'(ev_list[i]) * 16'h100 + 16'(s) * 16'h20 + 16'(t), d);
          check($sformatf("ev %0d seg %0d tick %0d", ev_list[i], s, t), d, 32'(model[ev_list[i]][s][t]));
        end
    // reserved words XXA0..XXFF
    hread(16'h40A0, d); check("reserved 40A0", d, 32'hBADD);
    hread(16'h7FFF, d); check("reserved 7FFF", d, 32'hBADD);
    hread(16'h5DC0, d); check("reserved 5DC0", d, 32'hBADD);
    hread(16'h7F9F, d); check("last word", d, 32'(model[63][4][31]));
    // out of range
    hread(16'h3FFF, d); check("below range", d, 0);
    hread(16'h8000, d); check("above range", d, 0);
    // not selected
    sel = 1'b0;
    hread(16'h4000, d); check("not selected", d, 0);
    sel = 1'b1;
    // host write and read back
    hwrite(16'h4123, 32'h0000_1357);
    hread(16'h4123, d); check("host write", d, 32'h1357);
    // capture wins over host write to the same word
    @(negedge clk);
    req = '0; req.addr = 16'h4000 + 16'h0500 + 16'h0040 + 16'h0003; req.wdata = 32'hAAAA; req.we = 1'b1;
    cap_valid = 1'b1; cap_event = 6'd5; cap_tick = 5'd3; cap_seg = '0; cap_seg[2] = 16'h0F0F;
    @(negedge clk);
    req = '0; cap_valid = 1'b0;
    hread(16'h4543, d); check("capture priority", d, 32'h0F0F);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
