// iop: the board's IO processor, between the host and the NSP SPs.
//
// Every SP is reached only through the IOP. Towards the SPs it drives one
// shared configuration bus and one shared read-address bus, with a per-SP
// enable decoded from the SP number the host gives; start is sent to every SP
// set in a mask, so runs can be launched on all SPs in the same cycle. Towards
// the host it merges the SPs' answers: the read-back plane of whichever SP
// answers, tagged with its number, a busy vector, and a done vector in which
// each SP's done pulse is held until that SP is started again.
// Timing: host requests are registered once, so an SP sees them one cycle
// after the host issues them; read-back data and status are registered once on
// the way back, so h_rd_valid rises two clock edges after the edge that samples h_rd_req.
// The description gives the IOP's role (connection of all SPs to the host,
// merging and moving data); its command set and timing here are this design's
// own. The Gigabit-Ethernet links to the host and the reconfiguration of the
// SP FPGAs are not modelled: the host side is a plain parallel port.
module iop
  import ianus_pkg::*;
#(
  parameter int unsigned NSP = 16,
  parameter int unsigned L   = 16
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // host side
  input  logic                            h_we,
  input  logic [$clog2(NSP)-1:0]          h_sp,
  input  mem_sel_e                        h_sel,
  input  logic [15:0]                     h_addr,
  input  logic [L*L-1:0]                  h_wdata,
  input  logic                            h_rd_req,
  input  logic [$clog2(NSP)-1:0]          h_rd_sp,
  input  mem_sel_e                        h_rd_sel,
  input  logic [$clog2(L)-1:0]            h_rd_addr,
  output logic                            h_rd_valid,
  output logic [$clog2(NSP)-1:0]          h_rd_src,
  output logic [L*L-1:0]                  h_rd_data,
  input  logic                            h_start,
  input  logic [NSP-1:0]                  h_start_mask,
  input  logic [15:0]                     h_n_sweeps,
  output logic [NSP-1:0]                  h_busy,
  output logic [NSP-1:0]                  h_done,
  // SP side
  output logic [NSP-1:0]                  sp_cfg_we,
  output mem_sel_e                        sp_cfg_sel,
  output logic [15:0]                     sp_cfg_addr,
  output logic [L*L-1:0]                  sp_cfg_wdata,
  output logic [NSP-1:0]                  sp_rd_req,
  output mem_sel_e                        sp_rd_sel,
  output logic [$clog2(L)-1:0]            sp_rd_addr,
  input  logic [NSP-1:0]                  sp_rd_valid,
  input  logic [NSP-1:0][L*L-1:0]         sp_rd_data,
  output logic [NSP-1:0]                  sp_start,
  output logic [15:0]                     sp_n_sweeps,
  input  logic [NSP-1:0]                  sp_busy,
  input  logic [NSP-1:0]                  sp_done
);
  localparam int unsigned SW = $clog2(NSP);

  // host -> SPs
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp_cfg_we    <= '0;
      sp_cfg_sel   <= SEL_SPIN_A;
      sp_cfg_addr  <= '0;
      sp_cfg_wdata <= '0;
      sp_rd_req    <= '0;
      sp_rd_sel    <= SEL_SPIN_A;
      sp_rd_addr   <= '0;
      sp_start     <= '0;
      sp_n_sweeps  <= '0;
    end else begin
      sp_cfg_we <= '0;
      sp_rd_req <= '0;
      sp_start  <= h_start ? h_start_mask : '0;
      if (h_we) begin
        sp_cfg_we[h_sp] <= 1'b1;
        sp_cfg_sel      <= h_sel;
        sp_cfg_addr     <= h_addr;
        sp_cfg_wdata    <= h_wdata;
      end
      if (h_rd_req) begin
        sp_rd_req[h_rd_sp] <= 1'b1;
        sp_rd_sel          <= h_rd_sel;
        sp_rd_addr         <= h_rd_addr;
      end
      if (h_start) sp_n_sweeps <= h_n_sweeps;
    end
  end

  // SPs -> host: merge the answering SP's plane and the status bits
  logic [SW-1:0]  src;
  logic [L*L-1:0] merged;
  always_comb begin
    src    = '0;
    merged = '0;
    for (int i = 0; i < int'(NSP); i++) begin
      if (sp_rd_valid[i]) begin
        src    = SW'(i);
        merged = sp_rd_data[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_rd_valid <= 1'b0;
      h_rd_src   <= '0;
      h_rd_data  <= '0;
      h_busy     <= '0;
      h_done     <= '0;
    end else begin
      h_rd_valid <= |sp_rd_valid;
      if (|sp_rd_valid) begin
        h_rd_src  <= src;
        h_rd_data <= merged;
      end
      h_busy <= sp_busy | sp_start;
      h_done <= (h_done & ~sp_start) | sp_done;
    end
  end

  // The host reads one plane at a time, so at most one SP answers per cycle.
  a_one_answer: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(sp_rd_valid));
endmodule
