// congestion_detector: NI, CI detector and EFCI congestion comparator.
//
// Compares the current queue length with three thresholds and registers the
// results: efci = (queue_len > q_efci) drives EFCI marking of egress data
// cells; ni = (queue_len > q_ni) and ci = (queue_len > q_ci) drive the
// relative-rate bits written into backward RM cells. The document names the
// NI/CI detector and says marking happens when the current queue length
// exceeds a congestion threshold; the use of a separate threshold for each
// bit and the one-clock register are this design's. Outputs follow the
// queue length with one clock of delay.
module congestion_detector (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] queue_len,
  input  logic [15:0] q_efci,
  input  logic [15:0] q_ni,
  input  logic [15:0] q_ci,
  output logic        efci,
  output logic        ni,
  output logic        ci
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      efci <= 1'b0; ni <= 1'b0; ci <= 1'b0;
    end else begin
      efci <= queue_len > q_efci;
      ni   <= queue_len > q_ni;
      ci   <= queue_len > q_ci;
    end
  end
endmodule
