// spin_engine: one SP configured for Metropolis Monte Carlo of a 3D spin glass.
//
// Two replicas of an L x L x L Edwards-Anderson lattice that share couplings
// are simulated together. Their sites are split into two artificial lattices:
// bank A holds the white sites of replica 1 and the black sites of replica 2,
// bank B the rest, so every neighbour of a site of one bank is in the other.
// At the start of a run A is the updating lattice S and B the neighbour
// lattice N; after each half-sweep the roles swap.
//
// Datapath per half-sweep (see sweep_ctrl for the cycle schedule): the N
// planes z-1 and z are held in plane registers, plane z+1 comes straight from
// the RAM, S plane z and the coupling planes z come from their RAMs and Jz
// plane z-1 from a register. The L*L update cells refresh all of S plane z at
// once and the result is written back at address z in the same cycle. Each
// cell consumes one 32-bit random number per update, supplied by NWHEEL
// Parisi-Rapuano wheels of RND_PER_WHEEL outputs each.
//
// Host port (used while busy is low; ignored while busy):
//   cfg_we/cfg_sel/cfg_addr/cfg_wdata write one plane (spin banks, Jx, Jy, Jz;
//   cfg_addr = z), one table entry (SEL_LUT; cfg_addr = index, data in
//   cfg_wdata[31:0], written to every table) or one wheel history word
//   (SEL_SEED; cfg_addr = wheel*64 + word, data in cfg_wdata[31:0]).
//   rd_req/rd_sel/rd_addr read one plane; rd_data is valid with rd_valid one
//   cycle later. start/n_sweeps launch a run; done pulses at its end.
// Plane bit x*L + y is site (x, y). Throughput: L*L spin updates per cycle in
// the RUN phase, L+3 cycles per half-sweep, 2*(L+3) cycles per sweep.
// The lattice split, the storage scheme, the plane pipeline, the role swap,
// the random wheels and the shared tables follow the source description; the
// host port, the encodings and the scheduling are this design's choices.
module spin_engine
  import ianus_pkg::*;
#(
  parameter int unsigned L             = 16,
  parameter int unsigned RND_PER_WHEEL = 128
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // configuration writes
  input  logic                 cfg_we,
  input  mem_sel_e             cfg_sel,
  input  logic [15:0]          cfg_addr,
  input  logic [L*L-1:0]       cfg_wdata,
  // plane read-back
  input  logic                 rd_req,
  input  mem_sel_e             rd_sel,
  input  logic [$clog2(L)-1:0] rd_addr,
  output logic                 rd_valid,
  output logic [L*L-1:0]       rd_data,
  // run control
  input  logic                 start,
  input  logic [15:0]          n_sweeps,
  output logic                 busy,
  output logic                 done
);
  localparam int unsigned AW     = $clog2(L);
  localparam int unsigned N      = L * L;
  localparam int unsigned NWHEEL = (N + RND_PER_WHEEL - 1) / RND_PER_WHEEL;
  localparam int unsigned PW     = $clog2(PR_LEN);

  // ---------------- controller ----------------
  logic          bank_s, rd_n_en, rd_s_en, rd_j_en;
  logic [AW-1:0] rd_n_addr, rd_s_addr, rd_j_addr, wr_z;
  dp_act_e       act;

  sweep_ctrl #(.L(L), .NW(16)) u_ctrl (
    .clk, .rst_n, .start, .n_sweeps, .busy, .done, .bank_s,
    .rd_n_en, .rd_n_addr, .rd_s_en, .rd_s_addr, .rd_j_en, .rd_j_addr,
    .act, .wr_z
  );

  // ---------------- memories ----------------
  logic          cfg_ok, rd_ok;
  assign cfg_ok = cfg_we && !busy;
  assign rd_ok  = rd_req && !busy;

  logic [N-1:0]  s_new;
  logic          comp;
  assign comp = (act == ACT_COMP);

  // spin banks
  logic          a_we, b_we, a_re, b_re;
  logic [AW-1:0] a_waddr, b_waddr, a_raddr, b_raddr;
  logic [N-1:0]  a_wdata, b_wdata, a_rdata, b_rdata;

  always_comb begin
    if (busy) begin
      a_we    = comp && !bank_s;
      b_we    = comp &&  bank_s;
      a_waddr = wr_z;
      b_waddr = wr_z;
      a_wdata = s_new;
      b_wdata = s_new;
      a_re    = bank_s ? rd_n_en   : rd_s_en;
      b_re    = bank_s ? rd_s_en   : rd_n_en;
      a_raddr = bank_s ? rd_n_addr : rd_s_addr;
      b_raddr = bank_s ? rd_s_addr : rd_n_addr;
    end else begin
      a_we    = cfg_ok && cfg_sel == SEL_SPIN_A;
      b_we    = cfg_ok && cfg_sel == SEL_SPIN_B;
      a_waddr = cfg_addr[AW-1:0];
      b_waddr = cfg_addr[AW-1:0];
      a_wdata = cfg_wdata;
      b_wdata = cfg_wdata;
      a_re    = rd_ok && rd_sel == SEL_SPIN_A;
      b_re    = rd_ok && rd_sel == SEL_SPIN_B;
      a_raddr = rd_addr;
      b_raddr = rd_addr;
    end
  end

  lattice_mem #(.L(L)) u_bank_a (.clk, .we(a_we), .waddr(a_waddr), .wdata(a_wdata),
                                 .re(a_re), .raddr(a_raddr), .rdata(a_rdata));
  lattice_mem #(.L(L)) u_bank_b (.clk, .we(b_we), .waddr(b_waddr), .wdata(b_wdata),
                                 .re(b_re), .raddr(b_raddr), .rdata(b_rdata));

  // coupling memories, one per axis
  logic [2:0]    j_we;
  logic [2:0]    j_re;
  logic [AW-1:0] j_raddr;
  logic [N-1:0]  jx_rdata, jy_rdata, jz_rdata;

  always_comb begin
    j_we[0] = cfg_ok && cfg_sel == SEL_JX;
    j_we[1] = cfg_ok && cfg_sel == SEL_JY;
    j_we[2] = cfg_ok && cfg_sel == SEL_JZ;
    if (busy) begin
      j_re    = {3{rd_j_en}};
      j_raddr = rd_j_addr;
    end else begin
      j_re[0] = rd_ok && rd_sel == SEL_JX;
      j_re[1] = rd_ok && rd_sel == SEL_JY;
      j_re[2] = rd_ok && rd_sel == SEL_JZ;
      j_raddr = rd_addr;
    end
  end

  lattice_mem #(.L(L)) u_jx (.clk, .we(j_we[0]), .waddr(cfg_addr[AW-1:0]), .wdata(cfg_wdata),
                             .re(j_re[0]), .raddr(j_raddr), .rdata(jx_rdata));
  lattice_mem #(.L(L)) u_jy (.clk, .we(j_we[1]), .waddr(cfg_addr[AW-1:0]), .wdata(cfg_wdata),
                             .re(j_re[1]), .raddr(j_raddr), .rdata(jy_rdata));
  lattice_mem #(.L(L)) u_jz (.clk, .we(j_we[2]), .waddr(cfg_addr[AW-1:0]), .wdata(cfg_wdata),
                             .re(j_re[2]), .raddr(j_raddr), .rdata(jz_rdata));

  // ---------------- plane registers ----------------
  logic [N-1:0] s_out, n_out, nbuf_m, nbuf_c, jzp;
  assign s_out = bank_s ? b_rdata : a_rdata;
  assign n_out = bank_s ? a_rdata : b_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nbuf_m <= '0;
      nbuf_c <= '0;
      jzp    <= '0;
    end else begin
      unique case (act)
        ACT_LOADM: begin
          nbuf_m <= n_out;
          jzp    <= jz_rdata;
        end
        ACT_LOADC: nbuf_c <= n_out;
        ACT_COMP: begin
          nbuf_m <= nbuf_c;
          nbuf_c <= n_out;
          jzp    <= jz_rdata;
        end
        default: ;
      endcase
    end
  end

  // ---------------- random numbers ----------------
  logic [NWHEEL*RND_PER_WHEEL-1:0][RND_W-1:0] rnd_all;
  logic [N-1:0][RND_W-1:0]                     rnd;
  assign rnd = rnd_all[N-1:0];

  for (genvar w = 0; w < NWHEEL; w++) begin : g_wheel
    pr_rng_wheel #(.W(RND_W), .NOUT(RND_PER_WHEEL)) u_wheel (
      .clk,
      .en        (comp),
      .seed_we   (cfg_ok && cfg_sel == SEL_SEED && cfg_addr[15:6] == 10'(w)),
      .seed_idx  (cfg_addr[PW-1:0]),
      .seed_data (cfg_wdata[RND_W-1:0]),
      .rnd       (rnd_all[w*RND_PER_WHEEL +: RND_PER_WHEEL])
    );
  end

  // ---------------- update cells ----------------
  update_array #(.L(L), .W(RND_W)) u_array (
    .clk,
    .s_plane   (s_out),
    .n_m       (nbuf_m),
    .n_c       (nbuf_c),
    .n_p       (n_out),
    .jx        (jx_rdata),
    .jy        (jy_rdata),
    .jz        (jz_rdata),
    .jzp       (jzp),
    .rnd       (rnd),
    .lut_we    (cfg_ok && cfg_sel == SEL_LUT),
    .lut_waddr (cfg_addr[LUT_AW-1:0]),
    .lut_wdata (cfg_wdata[RND_W-1:0]),
    .s_new     (s_new),
    .flip      ()
  );

  // ---------------- read-back ----------------
  mem_sel_e rd_sel_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid <= 1'b0;
      rd_sel_q <= SEL_SPIN_A;
    end else begin
      rd_valid <= rd_ok;
      if (rd_ok) rd_sel_q <= rd_sel;
    end
  end

  always_comb begin
    unique case (rd_sel_q)
      SEL_SPIN_B: rd_data = b_rdata;
      SEL_JX:     rd_data = jx_rdata;
      SEL_JY:     rd_data = jy_rdata;
      SEL_JZ:     rd_data = jz_rdata;
      default:    rd_data = a_rdata;
    endcase
  end
endmodule
