// hdl_node_if: the handshake of a LabVIEW FPGA "HDL node" in a single-cycle
// timed loop.
//
// LabVIEW drives enable_in; the node must only advance its internal registers
// while enable_in is high, and report with enable_out when its result is
// valid. This block turns enable_in into the clock enable 'ce' used by every
// register and RAM of the engine, and keeps enable_out low until the engine
// reports 'done'; from then on enable_out follows enable_in one clock later
// (it lags enable_in by one cycle). That behaviour follows the original
// design; the single-cycle lag and the active-low asynchronous reset are this
// design's choices.
module hdl_node_if (
  input  logic clk,
  input  logic rst_n,
  input  logic enable_in,   // from LabVIEW
  input  logic done,        // engine finished its computation
  output logic ce,          // clock enable for all internal registers
  output logic enable_out   // to LabVIEW: outputs valid
);
  assign ce = enable_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) enable_out <= 1'b0;
    else        enable_out <= enable_in && done;
  end

  // enable_out may only rise while the engine reports completion.
  a_out_after_done: assert property (@(posedge clk) disable iff (!rst_n)
    $rose(enable_out) |-> $past(done));
endmodule
