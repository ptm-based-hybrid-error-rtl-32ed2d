// axi_regs: AXI4-Lite register file of the hardware monitor.
//
// The published architecture sets the confidence ranges "through the AXI peripheral
// interface"; the register map, the status and counter registers and the
// handshake below are this design's own. 32-bit registers, byte addresses:
//   0x00 CTRL        [0] check enable                                   RW
//   0x04 RANGE_EN    [NUM_RANGES-1:0] enable of each confidence range   RW
//   0x08 STATUS      [0] error (write 1 to clear)                        RW1C
//                    [1] PC known  [2] trace synchronised                RO
//                    [3] synchronisation was lost (write 1 to clear)     RW1C
//                    [4] unsupported instruction set seen (w1c)          RW1C
//   0x0C PC          last followed PC                                    RO
//   0x10 ERR_PC      first PC outside all ranges since the last clear    RO
//   0x14 ERR_COUNT   PC updates found outside all ranges                 RO
//   0x18 CHECK_COUNT PC updates checked                                  RO
//   0x40+8*i         RANGE_LO[i], lowest allowed address (inclusive)     RW
//   0x44+8*i         RANGE_HI[i], highest allowed address (inclusive)    RW
// Other addresses read as zero and ignore writes; responses are always OKAY.
//
// Handshake: a write is taken in the cycle where AWVALID and WVALID are both
// high and no response is pending (AWREADY = WREADY = that condition); BVALID
// follows one cycle later and stays until BREADY. A read is taken when
// ARVALID is high and no read data is pending; RVALID follows one cycle later
// and stays until RREADY. WSTRB selects the bytes written.
module axi_regs #(
  parameter int unsigned NUM_RANGES = 8,
  parameter int unsigned ADDR_W     = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // AXI4-Lite slave
  input  logic [ADDR_W-1:0]     s_awaddr,
  input  logic                  s_awvalid,
  output logic                  s_awready,
  input  logic [31:0]           s_wdata,
  input  logic [3:0]            s_wstrb,
  input  logic                  s_wvalid,
  output logic                  s_wready,
  output logic [1:0]            s_bresp,
  output logic                  s_bvalid,
  input  logic                  s_bready,
  input  logic [ADDR_W-1:0]     s_araddr,
  input  logic                  s_arvalid,
  output logic                  s_arready,
  output logic [31:0]           s_rdata,
  output logic [1:0]            s_rresp,
  output logic                  s_rvalid,
  input  logic                  s_rready,
  // configuration
  output logic                  enable,
  output logic [NUM_RANGES-1:0] range_en,
  output logic [31:0]           range_lo [NUM_RANGES],
  output logic [31:0]           range_hi [NUM_RANGES],
  output logic                  err_clear,
  // status
  input  logic                  error,
  input  logic                  pc_valid,
  input  logic                  synced,
  input  logic                  lost_sync_evt,
  input  logic                  isa_err_evt,
  input  logic [31:0]           pc,
  input  logic [31:0]           err_pc,
  input  logic [31:0]           err_count,
  input  logic [31:0]           check_count
);

  localparam logic [ADDR_W-1:0] A_CTRL     = ADDR_W'('h00);
  localparam logic [ADDR_W-1:0] A_RANGE_EN = ADDR_W'('h04);
  localparam logic [ADDR_W-1:0] A_STATUS   = ADDR_W'('h08);
  localparam logic [ADDR_W-1:0] A_PC       = ADDR_W'('h0C);
  localparam logic [ADDR_W-1:0] A_ERR_PC   = ADDR_W'('h10);
  localparam logic [ADDR_W-1:0] A_ERR_CNT  = ADDR_W'('h14);
  localparam logic [ADDR_W-1:0] A_CHK_CNT  = ADDR_W'('h18);
  localparam int unsigned       RANGE_BASE = 'h40;

  logic lost_sync_q, isa_err_q;
  logic wr_go, rd_go;

  assign s_awready = s_awvalid && s_wvalid && !s_bvalid;
  assign s_wready  = s_awready;
  assign wr_go     = s_awready;
  assign s_arready = !s_rvalid;
  assign rd_go     = s_arvalid && s_arready;
  assign s_bresp   = 2'b00;
  assign s_rresp   = 2'b00;

  function automatic logic [31:0] apply_strb(logic [31:0] old, logic [31:0] d, logic [3:0] s);
    logic [31:0] r;
    for (int k = 0; k < 4; k++) r[8*k +: 8] = s[k] ? d[8*k +: 8] : old[8*k +: 8];
    return r;
  endfunction

  // Write side.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_bvalid    <= 1'b0;
      enable      <= 1'b0;
      range_en    <= '0;
      range_lo    <= '{default: '0};
      range_hi    <= '{default: '0};
      err_clear   <= 1'b0;
      lost_sync_q <= 1'b0;
      isa_err_q   <= 1'b0;
    end else begin
      err_clear <= 1'b0;
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;
      if (lost_sync_evt) lost_sync_q <= 1'b1;
      if (isa_err_evt)   isa_err_q   <= 1'b1;
      if (wr_go) begin
        s_bvalid <= 1'b1;
        if (s_awaddr == A_CTRL && s_wstrb[0]) enable <= s_wdata[0];
        if (s_awaddr == A_RANGE_EN)
          range_en <= NUM_RANGES'(apply_strb(32'(range_en), s_wdata, s_wstrb));
        if (s_awaddr == A_STATUS && s_wstrb[0]) begin
          if (s_wdata[0]) err_clear <= 1'b1;
          if (s_wdata[3] && !lost_sync_evt) lost_sync_q <= 1'b0;
          if (s_wdata[4] && !isa_err_evt)   isa_err_q   <= 1'b0;
        end
        for (int i = 0; i < NUM_RANGES; i++) begin
          if (int'(s_awaddr) == RANGE_BASE + 8*i)
            range_lo[i] <= apply_strb(range_lo[i], s_wdata, s_wstrb);
          if (int'(s_awaddr) == RANGE_BASE + 8*i + 4)
            range_hi[i] <= apply_strb(range_hi[i], s_wdata, s_wstrb);
        end
      end
    end
  end

  // Read side.
  logic [31:0] rd_mux;

  always_comb begin
    rd_mux = '0;
    unique case (s_araddr)
      A_CTRL:     rd_mux = {31'b0, enable};
      A_RANGE_EN: rd_mux = 32'(range_en);
      A_STATUS:   rd_mux = {27'b0, isa_err_q, lost_sync_q, synced, pc_valid, error};
      A_PC:       rd_mux = pc;
      A_ERR_PC:   rd_mux = err_pc;
      A_ERR_CNT:  rd_mux = err_count;
      A_CHK_CNT:  rd_mux = check_count;
      default: begin
        for (int i = 0; i < NUM_RANGES; i++) begin
          if (int'(s_araddr) == RANGE_BASE + 8*i)     rd_mux = range_lo[i];
          if (int'(s_araddr) == RANGE_BASE + 8*i + 4) rd_mux = range_hi[i];
        end
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_rvalid <= 1'b0;
      s_rdata  <= '0;
    end else begin
      if (s_rvalid && s_rready) s_rvalid <= 1'b0;
      if (rd_go) begin
        s_rvalid <= 1'b1;
        s_rdata  <= rd_mux;
      end
    end
  end

  // AXI rules on this slave's responses: a response, once offered, is held
  // unchanged until it is accepted.
  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_bvalid && !s_bready |=> s_bvalid);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata));
  // The range table must fit in the address space.
  initial assert (RANGE_BASE + 8*NUM_RANGES <= (1 << ADDR_W))
    else $error("axi_regs: ADDR_W too small for NUM_RANGES");

endmodule
