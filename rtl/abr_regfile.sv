// abr_regfile: I/O bus interface controller and parameter register file.
//
// A simple synchronous register bus lets a host read and write the engine's
// parameters: a write happens on a clock with bus_we high; bus_rdata shows
// the addressed register combinationally. Floating point parameters are
// written as IEEE-754 bit patterns, thresholds and periods as integers.
// Address map (word addresses):
//   0 A0   1 B0   2 A1   3 B1   4 ql_th   5 q_target   6 link_speed
//   7 delta   8 lambda   9 N_RM/W   10 q_efci   11 q_ni   12 q_ci
//   13 T period (cells)   14 W period (cells)
//   16 ER (read only, fp)   17 QC (read only, fp)   18 ER (read only, rate)
// The document says only that an I/O bus interface controller reads and
// writes the parameter values in the register file and that A, B, T and q_T
// are constants found by simulation; the bus, the map and all reset values
// are this design's (link_speed = 353207 cells/s is a 155.52 Mb/s SONET
// link's cell payload rate).
module abr_regfile
  import abr_pkg::*;
#(
  parameter fp32_t       A0_RST     = 32'h44FA_0000,  // 2000.0
  parameter fp32_t       B0_RST     = 32'h4348_0000,  // 200.0
  parameter fp32_t       A1_RST     = 32'h43FA_0000,  // 500.0
  parameter fp32_t       B1_RST     = 32'h4248_0000,  // 50.0
  parameter fp32_t       QLTH_RST   = 32'h4248_0000,  // 50.0 cells
  parameter fp32_t       QT_RST     = 32'h42C8_0000,  // 100.0 cells
  parameter fp32_t       LINK_RST   = 32'h48AC_76E0,  // 353207.0 cells/s
  parameter fp32_t       DELTA_RST  = 32'h3F66_6666,  // 0.9
  parameter fp32_t       LAMBDA_RST = 32'h3F40_0000,  // 0.75
  parameter fp32_t       NRMW_RST   = 32'h4548_0000,  // 3200.0 = 32 / 10 ms
  parameter logic [15:0] QEFCI_RST  = 16'd200,
  parameter logic [15:0] QNI_RST    = 16'd150,
  parameter logic [15:0] QCI_RST    = 16'd300,
  parameter logic [15:0] T_RST      = 16'd353,        // about 1 ms of cell times
  parameter logic [15:0] W_RST      = 16'd3532        // about 10 ms of cell times
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bus_we,
  input  logic [4:0]  bus_addr,
  input  logic [31:0] bus_wdata,
  output logic [31:0] bus_rdata,
  input  fp32_t       er,
  input  rate_t       er_rate,
  input  fp32_t       qc,
  output abr_params_t prm
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prm.a0 <= A0_RST; prm.b0 <= B0_RST; prm.a1 <= A1_RST; prm.b1 <= B1_RST;
      prm.ql_th <= QLTH_RST; prm.q_target <= QT_RST; prm.link_speed <= LINK_RST;
      prm.delta <= DELTA_RST; prm.lambda <= LAMBDA_RST; prm.nrm_over_w <= NRMW_RST;
      prm.q_efci <= QEFCI_RST; prm.q_ni <= QNI_RST; prm.q_ci <= QCI_RST;
      prm.t_period <= T_RST; prm.w_period <= W_RST;
    end else if (bus_we) begin
      unique case (bus_addr)
        5'd0:  prm.a0         <= bus_wdata;
        5'd1:  prm.b0         <= bus_wdata;
        5'd2:  prm.a1         <= bus_wdata;
        5'd3:  prm.b1         <= bus_wdata;
        5'd4:  prm.ql_th      <= bus_wdata;
        5'd5:  prm.q_target   <= bus_wdata;
        5'd6:  prm.link_speed <= bus_wdata;
        5'd7:  prm.delta      <= bus_wdata;
        5'd8:  prm.lambda     <= bus_wdata;
        5'd9:  prm.nrm_over_w <= bus_wdata;
        5'd10: prm.q_efci     <= bus_wdata[15:0];
        5'd11: prm.q_ni       <= bus_wdata[15:0];
        5'd12: prm.q_ci       <= bus_wdata[15:0];
        5'd13: prm.t_period   <= bus_wdata[15:0];
        5'd14: prm.w_period   <= bus_wdata[15:0];
        default: ;
      endcase
    end
  end

  always_comb begin
    unique case (bus_addr)
      5'd0:  bus_rdata = prm.a0;
      5'd1:  bus_rdata = prm.b0;
      5'd2:  bus_rdata = prm.a1;
      5'd3:  bus_rdata = prm.b1;
      5'd4:  bus_rdata = prm.ql_th;
      5'd5:  bus_rdata = prm.q_target;
      5'd6:  bus_rdata = prm.link_speed;
      5'd7:  bus_rdata = prm.delta;
      5'd8:  bus_rdata = prm.lambda;
      5'd9:  bus_rdata = prm.nrm_over_w;
      5'd10: bus_rdata = {16'h0, prm.q_efci};
      5'd11: bus_rdata = {16'h0, prm.q_ni};
      5'd12: bus_rdata = {16'h0, prm.q_ci};
      5'd13: bus_rdata = {16'h0, prm.t_period};
      5'd14: bus_rdata = {16'h0, prm.w_period};
      5'd16: bus_rdata = er;
      5'd17: bus_rdata = qc;
      5'd18: bus_rdata = {16'h0, er_rate};
      default: bus_rdata = 32'h0;
    endcase
  end
endmodule
