// zpd_host_port: block selection and the registers every board carries.
//
// Each board owns one bit of the 16-bit block field of a host request. A
// request addresses the board when its block field has that bit set, so a
// group identifier such as 0x002a (the three A10 Finders) or 0x1554 (all
// Fitters) reaches several boards at once; this is meant for writes. A read
// must name one board only, since every addressed board answers it.
//
// Registers at word addresses 0..F:
//   0      Version  read only, the VERSION parameter
//   1      Control  read/write, 16 bits, brought out on 'control' (the crate
//                   assigns it no function; it is kept as a scratch register)
//   2      Status   read only, the 'status' input
//   3..F   reserved, read as 0, writes ignored
// The block map and the register list follow the crate's memory map; the
// width of Control and the value returned by reserved words are own choices.
//
// Timing: 'sel' is combinational from the request. Read data is registered
// and appears on 'rdata' one cycle after the request; 'rdata' is 0 whenever
// this register file was not read, so a board can OR it with its memories.
module zpd_host_port
  import zpd_pkg::*;
#(
  parameter logic [BLK_W-1:0] ID      = BLK_SERGIO,
  parameter logic [15:0]      VERSION = 16'h0100
) (
  input  logic              clk,
  input  logic              rst_n,
  input  host_req_t         req,
  input  logic [15:0]       status,
  output logic              sel,
  output logic [15:0]       control,
  output logic [DATA_W-1:0] rdata
);

  logic misc_hit;

  always_comb begin
    sel      = |(req.blk & ID);
    misc_hit = sel && (req.addr[ADDR_W-1:4] == '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      control <= '0;
      rdata   <= '0;
    end else begin
      rdata <= '0;
      if (misc_hit && req.we && req.addr[3:0] == A_CONTROL[3:0])
        control <= req.wdata[15:0];
      if (misc_hit && req.re) begin
        unique case (req.addr[3:0])
          A_VERSION[3:0]: rdata <= DATA_W'(VERSION);
          A_CONTROL[3:0]: rdata <= DATA_W'(control);
          A_STATUS[3:0]:  rdata <= DATA_W'(status);
          default:        rdata <= '0;
        endcase
      end
    end
  end

  // A read and a write in the same request are not part of the protocol.
  assert property (@(posedge clk) disable iff (!rst_n) !(req.we && req.re))
    else $error("host request with both we and re");

endmodule
