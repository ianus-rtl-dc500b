// sweep_ctrl: sequencing of the plane-parallel Monte Carlo sweep.
//
// A run of n_sweeps Monte Carlo sweeps is 2*n_sweeps half-sweeps. In each
// half-sweep every plane z = 0 .. L-1 of the S lattice is updated from the N
// lattice; then S and N swap roles (bank_s toggles), so a full sweep updates
// both checkerboard halves of both replicas. One half-sweep takes L+3 cycles:
//   PRE0   read N plane L-1 and Jz plane L-1 (the z-1 planes of z = 0)
//   PRE1   read N plane 0
//   RUN    L cycles; at step z read N plane z+1 (mod L), S plane z and the
//          coupling planes z. At regime only one N plane is fetched per
//          cycle: planes z-1 and z are kept from the previous steps.
//   DRAIN  the update of plane L-1 is written back; no reads, so the next
//          half-sweep never reads a plane in the cycle it is written.
// RAM reads are synchronous, so each read is acted on one cycle later: act
// and wr_z are the registered tags that tell the datapath what the RAM outputs
// hold in the current cycle (ACT_COMP means: update plane wr_z and write it
// back to bank bank_s).
// start is taken in IDLE only; done pulses one cycle when the run ends;
// start with n_sweeps = 0 gives done at once.
// The plane order, the single N fetch at regime and the role swap follow the
// source description; the prologue/drain scheduling is this design's choice.
module sweep_ctrl
  import ianus_pkg::*;
#(
  parameter int unsigned L  = 16,
  parameter int unsigned NW = 16   // width of the sweep count
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [NW-1:0]        n_sweeps,
  output logic                 busy,
  output logic                 done,
  output logic                 bank_s,     // 0: bank A is S, 1: bank B is S
  output logic                 rd_n_en,
  output logic [$clog2(L)-1:0] rd_n_addr,
  output logic                 rd_s_en,
  output logic [$clog2(L)-1:0] rd_s_addr,
  output logic                 rd_j_en,
  output logic [$clog2(L)-1:0] rd_j_addr,
  output dp_act_e              act,
  output logic [$clog2(L)-1:0] wr_z
);
  localparam int unsigned AW = $clog2(L);
  localparam logic [AW-1:0] ZLAST = AW'(L - 1);

  typedef enum logic [2:0] {S_IDLE, S_PRE0, S_PRE1, S_RUN, S_DRAIN} state_e;

  state_e        state;
  logic [AW-1:0] z;
  logic [NW:0]   halves_left;
  dp_act_e       act_d;

  always_comb begin
    rd_n_en   = 1'b0;
    rd_s_en   = 1'b0;
    rd_j_en   = 1'b0;
    rd_n_addr = '0;
    rd_s_addr = z;
    rd_j_addr = z;
    act_d     = ACT_NONE;
    unique case (state)
      S_PRE0: begin
        rd_n_en   = 1'b1;
        rd_n_addr = ZLAST;
        rd_j_en   = 1'b1;
        rd_j_addr = ZLAST;
        act_d     = ACT_LOADM;
      end
      S_PRE1: begin
        rd_n_en   = 1'b1;
        rd_n_addr = '0;
        act_d     = ACT_LOADC;
      end
      S_RUN: begin
        rd_n_en   = 1'b1;
        rd_n_addr = (z == ZLAST) ? '0 : z + 1'b1;
        rd_s_en   = 1'b1;
        rd_j_en   = 1'b1;
        act_d     = ACT_COMP;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      z           <= '0;
      halves_left <= '0;
      bank_s      <= 1'b0;
      done        <= 1'b0;
      act         <= ACT_NONE;
      wr_z        <= '0;
    end else begin
      done <= 1'b0;
      act  <= act_d;
      wr_z <= z;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            if (n_sweeps == '0) begin
              done <= 1'b1;
            end else begin
              halves_left <= {n_sweeps, 1'b0};
              state       <= S_PRE0;
            end
          end
        end
        S_PRE0: state <= S_PRE1;
        S_PRE1: begin
          z     <= '0;
          state <= S_RUN;
        end
        S_RUN: begin
          if (z == ZLAST) state <= S_DRAIN;
          else            z     <= z + 1'b1;
        end
        S_DRAIN: begin
          bank_s      <= ~bank_s;
          halves_left <= halves_left - 1'b1;
          if (halves_left == 1) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            state <= S_PRE0;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);


  // A write-back is only ever issued one cycle after the matching read.
  a_comp_after_run: assert property (@(posedge clk) disable iff (!rst_n)
    act == ACT_COMP |-> $past(state) == S_RUN);

endmodule
