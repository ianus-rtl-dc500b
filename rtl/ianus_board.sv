// ianus_board: one IANUS processing board, the top of the design.
//
// NSP SP processors (16, a 4 x 4 grid on the board) each run an independent
// spin-glass Monte Carlo simulation on their own L x L x L lattice pair
// (spin_engine). All of them hang off the IO processor (iop), which is the
// board's only door to the host: the host loads couplings, spins, probability
// tables and random seeds into any SP, starts runs on any set of SPs and reads
// planes back, all through the plain parallel port below.
// The SPs' nearest-neighbour links of the 4 x 4 torus are not part of this
// RTL: the simulations configured here are independent per SP and never use
// them, and their signalling is not specified. Likewise the host link is a
// parallel port rather than the board's Gigabit-Ethernet connection.
// Timing: see iop (one register stage each way) and spin_engine.
module ianus_board
  import ianus_pkg::*;
#(
  parameter int unsigned NSP           = 16,
  parameter int unsigned L             = 16,
  parameter int unsigned RND_PER_WHEEL = 128
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    h_we,
  input  logic [$clog2(NSP)-1:0]  h_sp,
  input  mem_sel_e                h_sel,
  input  logic [15:0]             h_addr,
  input  logic [L*L-1:0]          h_wdata,
  input  logic                    h_rd_req,
  input  logic [$clog2(NSP)-1:0]  h_rd_sp,
  input  mem_sel_e                h_rd_sel,
  input  logic [$clog2(L)-1:0]    h_rd_addr,
  output logic                    h_rd_valid,
  output logic [$clog2(NSP)-1:0]  h_rd_src,
  output logic [L*L-1:0]          h_rd_data,
  input  logic                    h_start,
  input  logic [NSP-1:0]          h_start_mask,
  input  logic [15:0]             h_n_sweeps,
  output logic [NSP-1:0]          h_busy,
  output logic [NSP-1:0]          h_done
);
  logic [NSP-1:0]          sp_cfg_we, sp_rd_req, sp_rd_valid, sp_start, sp_busy, sp_done;
  mem_sel_e                sp_cfg_sel, sp_rd_sel;
  logic [15:0]             sp_cfg_addr, sp_n_sweeps;
  logic [L*L-1:0]          sp_cfg_wdata;
  logic [$clog2(L)-1:0]    sp_rd_addr;
  logic [NSP-1:0][L*L-1:0] sp_rd_data;

  iop #(.NSP(NSP), .L(L)) u_iop (
    .clk, .rst_n,
    .h_we, .h_sp, .h_sel, .h_addr, .h_wdata,
    .h_rd_req, .h_rd_sp, .h_rd_sel, .h_rd_addr, .h_rd_valid, .h_rd_src, .h_rd_data,
    .h_start, .h_start_mask, .h_n_sweeps, .h_busy, .h_done,
    .sp_cfg_we, .sp_cfg_sel, .sp_cfg_addr, .sp_cfg_wdata,
    .sp_rd_req, .sp_rd_sel, .sp_rd_addr, .sp_rd_valid, .sp_rd_data,
    .sp_start, .sp_n_sweeps, .sp_busy, .sp_done
  );

  for (genvar i = 0; i < NSP; i++) begin : g_sp
    spin_engine #(.L(L), .RND_PER_WHEEL(RND_PER_WHEEL)) u_sp (
      .clk, .rst_n,
      .cfg_we    (sp_cfg_we[i]),
      .cfg_sel   (sp_cfg_sel),
      .cfg_addr  (sp_cfg_addr),
      .cfg_wdata (sp_cfg_wdata),
      .rd_req    (sp_rd_req[i]),
      .rd_sel    (sp_rd_sel),
      .rd_addr   (sp_rd_addr),
      .rd_valid  (sp_rd_valid[i]),
      .rd_data   (sp_rd_data[i]),
      .start     (sp_start[i]),
      .n_sweeps  (sp_n_sweeps),
      .busy      (sp_busy[i]),
      .done      (sp_done[i])
    );
  end
endmodule
