// range_checker: checks every followed PC against the confidence ranges.
//
// A confidence range is an inclusive address window [lo, hi] in which the
// application's code lies. The published architecture gives up to eight ranges, set by
// software, and an error signal raised whenever the PC at a waypoint lies in
// none of the enabled ranges. Here each update is compared with all ranges in
// parallel in one registered stage. The error flag is sticky until clear is
// pulsed, so that a short excursion is not missed by the external observer;
// the first offending PC is kept and every offending update is counted
// (design choices, not from the published architecture).
//
// Interface: upd_valid/upd from pc_follower; enable gates the check;
// range_en/range_lo/range_hi describe the ranges. error rises, and
// violation pulses, on the clock edge after the offending update.
module range_checker
  import ptm_pkg::*;
#(
  parameter int unsigned NUM_RANGES = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  enable,
  input  logic [NUM_RANGES-1:0] range_en,
  input  logic [31:0]           range_lo [NUM_RANGES],
  input  logic [31:0]           range_hi [NUM_RANGES],
  input  logic                  upd_valid,
  input  pc_upd_t               upd,
  input  logic                  clear,
  output logic                  error,
  output logic                  violation,
  output logic [31:0]           err_pc,
  output logic [31:0]           err_count,
  output logic [31:0]           check_count
);

  logic [NUM_RANGES-1:0] hit;
  logic                  in_any;

  always_comb begin
    for (int i = 0; i < NUM_RANGES; i++)
      hit[i] = range_en[i] && (upd.pc >= range_lo[i]) && (upd.pc <= range_hi[i]);
    in_any = |hit;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      error       <= 1'b0;
      violation   <= 1'b0;
      err_pc      <= '0;
      err_count   <= '0;
      check_count <= '0;
    end else begin
      violation <= 1'b0;
      if (clear) error <= 1'b0;
      if (enable && upd_valid) begin
        check_count <= check_count + 32'd1;
        if (!in_any) begin
          violation <= 1'b1;
          error     <= 1'b1;
          err_count <= err_count + 32'd1;
          if (!error || clear) err_pc <= upd.pc;
        end
      end
    end
  end

endmodule
