// gcd_array: N_CORES independent GCD cores behind one load bus and one
// read-out port, so that many GCDs are computed at the same time.
//
// How it works: a load writes the operand pair to the core named by ld_core
// and starts it; loads to other cores may follow on the next cycles while
// earlier ones are still computing. Each core runs the Euclidean algorithm on
// its own (see gcd_core). done_mask shows which cores hold a finished result,
// and rd_core selects the core whose result, done flag and cycle count appear
// on the rd_* outputs (combinational multiplexer).
//
// The count of 1280 cores is the design's own figure; the shared load bus and
// read-out multiplexer are this implementation's choice of host interface.
// A load to a core that is still busy is ignored (ld_accept low).
module gcd_array #(
  parameter int unsigned N_CORES = 1280,
  parameter int unsigned W       = 1024,
  localparam int unsigned IW     = (N_CORES > 1) ? $clog2(N_CORES) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ld_valid,
  input  logic [IW-1:0]      ld_core,
  input  logic [W-1:0]       ld_x,
  input  logic [W-1:0]       ld_y,
  output logic               ld_accept,
  output logic [N_CORES-1:0] busy_mask,
  output logic [N_CORES-1:0] done_mask,
  input  logic [IW-1:0]      rd_core,
  output logic [W-1:0]       rd_result,
  output logic               rd_done,
  output logic [31:0]        rd_cycles
);
  logic [W-1:0] res  [N_CORES];
  logic [31:0]  cyc  [N_CORES];

  for (genvar i = 0; i < N_CORES; i++) begin : g_core
    gcd_core #(.W(W)) u_core (
      .clk    (clk),
      .rst_n  (rst_n),
      .start  (ld_valid && (ld_core == IW'(i))),
      .x_in   (ld_x),
      .y_in   (ld_y),
      .busy   (busy_mask[i]),
      .done   (done_mask[i]),
      .result (res[i]),
      .cycles (cyc[i])
    );
  end

  always_comb begin
    ld_accept = ld_valid && (32'(ld_core) < N_CORES) && !busy_mask[ld_core];
    rd_result = '0;
    rd_done   = 1'b0;
    rd_cycles = '0;
    if (32'(rd_core) < N_CORES) begin
      rd_result = res[rd_core];
      rd_done   = done_mask[rd_core];
      rd_cycles = cyc[rd_core];
    end
  end
endmodule
