// hw_monitor: control-flow error detector for an ARM core, driven by the
// program flow trace of its PTM.
//
// The core's PTM trace leaves the processing system through the trace port
// (TPIU) and reaches this monitor one byte per clock. Three stages follow the
// published block diagram: pft_decoder delimits the PFT packets, pc_follower
// rebuilds the PC at every waypoint, and range_checker compares that PC with
// the confidence ranges that software sets through the AXI4-Lite registers
// (axi_regs). A PC outside every enabled range raises the error output, which
// stays high until software clears it. Data errors are left to software
// (duplicated variables) and are not seen here.
//
// Timing: four register stages (capture, decode, follow, check). The
// violation pulse and the error output rise on the third clock edge after the
// edge that samples the last byte of the offending packet.
//
// Interface: trace_valid/trace_data carry the trace byte stream (formatter
// bypassed, one byte per clock: a design choice, the architecture gives no port
// width); s_axi_* is the AXI4-Lite slave (map in axi_regs); error is the error
// signal, violation pulses once per offending PC; synced and pc_valid show
// the decoder and follower state.
module hw_monitor
  import ptm_pkg::*;
#(
  parameter int unsigned NUM_RANGES = 8,  // confidence ranges (architecture: up to eight)
  parameter int unsigned CID_BYTES  = 0,  // context ID bytes configured in the PTM
  parameter int unsigned ADDR_W     = 8   // AXI4-Lite address width
) (
  input  logic              clk,
  input  logic              rst_n,
  // trace port
  input  logic              trace_valid,
  input  logic [7:0]        trace_data,
  // AXI4-Lite slave
  input  logic [ADDR_W-1:0] s_axi_awaddr,
  input  logic              s_axi_awvalid,
  output logic              s_axi_awready,
  input  logic [31:0]       s_axi_wdata,
  input  logic [3:0]        s_axi_wstrb,
  input  logic              s_axi_wvalid,
  output logic              s_axi_wready,
  output logic [1:0]        s_axi_bresp,
  output logic              s_axi_bvalid,
  input  logic              s_axi_bready,
  input  logic [ADDR_W-1:0] s_axi_araddr,
  input  logic              s_axi_arvalid,
  output logic              s_axi_arready,
  output logic [31:0]       s_axi_rdata,
  output logic [1:0]        s_axi_rresp,
  output logic              s_axi_rvalid,
  input  logic              s_axi_rready,
  // monitor outputs
  output logic              error,
  output logic              violation,
  output logic              synced,
  output logic              pc_valid
);

  pft_pkt_t pkt;
  logic     pkt_valid;
  pc_upd_t  upd;
  logic     upd_valid;
  logic     isa_err;

  logic                  enable, err_clear;
  logic [NUM_RANGES-1:0] range_en;
  logic [31:0]           range_lo [NUM_RANGES];
  logic [31:0]           range_hi [NUM_RANGES];
  logic [31:0]           err_pc, err_count, check_count;
  logic [31:0]           last_pc;

  pft_decoder #(.CID_BYTES(CID_BYTES)) u_decoder (
    .clk, .rst_n,
    .in_valid (trace_valid),
    .in_byte  (trace_data),
    .pkt_valid,
    .pkt,
    .synced
  );

  pc_follower u_follower (
    .clk, .rst_n,
    .synced,
    .pkt_valid,
    .pkt,
    .upd_valid,
    .upd,
    .pc_valid,
    .isa_err
  );

  range_checker #(.NUM_RANGES(NUM_RANGES)) u_checker (
    .clk, .rst_n,
    .enable,
    .range_en,
    .range_lo,
    .range_hi,
    .upd_valid,
    .upd,
    .clear     (err_clear),
    .error,
    .violation,
    .err_pc,
    .err_count,
    .check_count
  );

  // Last followed PC, for software.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         last_pc <= '0;
    else if (upd_valid) last_pc <= upd.pc;
  end

  axi_regs #(.NUM_RANGES(NUM_RANGES), .ADDR_W(ADDR_W)) u_regs (
    .clk, .rst_n,
    .s_awaddr  (s_axi_awaddr),
    .s_awvalid (s_axi_awvalid),
    .s_awready (s_axi_awready),
    .s_wdata   (s_axi_wdata),
    .s_wstrb   (s_axi_wstrb),
    .s_wvalid  (s_axi_wvalid),
    .s_wready  (s_axi_wready),
    .s_bresp   (s_axi_bresp),
    .s_bvalid  (s_axi_bvalid),
    .s_bready  (s_axi_bready),
    .s_araddr  (s_axi_araddr),
    .s_arvalid (s_axi_arvalid),
    .s_arready (s_axi_arready),
    .s_rdata   (s_axi_rdata),
    .s_rresp   (s_axi_rresp),
    .s_rvalid  (s_axi_rvalid),
    .s_rready  (s_axi_rready),
    .enable,
    .range_en,
    .range_lo,
    .range_hi,
    .err_clear,
    .error,
    .pc_valid,
    .synced,
    .lost_sync_evt (pkt_valid && pkt.ptype == PKT_BAD),
    .isa_err_evt   (isa_err),
    .pc            (last_pc),
    .err_pc,
    .err_count,
    .check_count
  );

endmodule
