// Histogram peak-climbing clustering processor (top level).
//
// Clusters the feature vectors (N dimensions each) of one video frame without
// supervision: num_vec vectors, up to J, the windows of the frame in raster
// order. The frame is written into the input frame memory through the fr_*
// port; start runs the whole algorithm, and when done pulses the cluster label of
// every window can be read from the label memory (lbl_raddr, one cycle latency),
// with num_clusters holding the number of clusters found.
//
// Dataflow, one stage after the other under cluster_ctrl:
//   frame memory -> N min-max PEs (min pass, then max pass)
//               -> N cell-size PEs (CS = (max - min) / Q + 1 LSB, Q = 3..8)
//               -> N index PEs (3-bit cell index per dimension) -> vector bank
//   -> bin_allocator   (J PEs: equal index vectors share a bin; ones compressor
//                       gives the bin density)
//   -> link_unit       (J PEs: link to the densest neighbouring bin)
//   -> cluster_assign  (J PEs: follow links to the peak)
//   -> cluster_group   (label the peaks 0..K-1, count them)
//   -> map_back        -> label memory
// Each stage keeps its results in its own registers, which are the register banks
// between stages. The phase order and the per-stage structure follow the design;
// handshakes, widths and the memory ports are this design's own choices.
module cluster_top #(
  parameter int unsigned N  = cluster_pkg::N_DIM,
  parameter int unsigned J  = cluster_pkg::J_VEC,
  parameter int unsigned W  = cluster_pkg::FEAT_W,
  localparam int unsigned JW = cluster_pkg::id_width(J),
  localparam int unsigned CW = cluster_pkg::cmp_width(J),
  localparam int unsigned VW = N * cluster_pkg::IDX_W
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic [cluster_pkg::Q_W-1:0]  q,
  input  logic [JW:0]                  num_vec,   // vectors in the frame (J_V x J_H), 1..J
  // input frame write port
  input  logic                         fr_we,
  input  logic [JW-1:0]                fr_waddr,
  input  logic [N-1:0][W-1:0]          fr_wdata,
  // label matrix read port
  input  logic [JW-1:0]                lbl_raddr,
  output logic [JW-1:0]                lbl_rdata,
  // status
  output logic                         busy,
  output logic                         done,
  output cluster_pkg::phase_e          phase,
  output logic [CW-1:0]                num_clusters,
  output logic [JW:0]                  num_bins
);

  // controller
  logic [JW-1:0] rd_addr;
  logic          mm_init, mm_valid, mm_refs, cs_load, ix_valid;
  logic          vec_we;
  logic [JW-1:0] vec_waddr;
  logic          alloc_start, alloc_done, link_start, link_done;
  logic          assign_start, assign_done, group_start, group_done;
  logic          map_start, map_done;

  // datapath
  logic [N-1:0][W-1:0]                  feat;
  logic signed [W-1:0]                  min_v [N];
  logic signed [W-1:0]                  max_v [N];
  logic [W:0]                           cs_v  [N];
  logic [N-1:0][cluster_pkg::IDX_W-1:0] idx_v;
  logic [VW-1:0]                        vec    [J];
  logic [JW-1:0]                        bin    [J];
  logic [CW-1:0]                        dens   [J];
  logic [JW-1:0]                        parent [J];
  logic [JW-1:0]                        root   [J];
  logic [J-1:0]                         peak;
  logic [JW-1:0]                        label  [J];
  logic                                 lbl_we;
  logic [JW-1:0]                        lbl_waddr, lbl_wdata;

  cluster_ctrl #(.J(J)) u_ctrl (
    .clk, .rst_n, .start, .num_vec,
    .rd_addr, .mm_init, .mm_valid, .mm_refs, .cs_load, .ix_valid,
    .vec_we, .vec_waddr,
    .alloc_start, .alloc_done, .link_start, .link_done,
    .assign_start, .assign_done, .group_start, .group_done,
    .map_start, .map_done,
    .busy, .done, .phase
  );

  frame_mem #(.WIDTH(N*W), .DEPTH(J)) u_frame (
    .clk, .we(fr_we), .waddr(fr_waddr), .wdata(fr_wdata),
    .raddr(rd_addr), .rdata(feat)
  );

  for (genvar k = 0; k < N; k++) begin : g_dim
    minmax_pe #(.W(W)) u_mm (
      .clk, .rst_n, .init(mm_init), .valid(mm_valid), .refs(mm_refs),
      .a(feat[k]), .min_q(min_v[k]), .max_q(max_v[k])
    );
    cs_pe #(.W(W)) u_cs (
      .clk, .rst_n, .load(cs_load), .q(q),
      .min_i(min_v[k]), .max_i(max_v[k]), .cs_q(cs_v[k])
    );
    index_pe #(.W(W)) u_ix (
      .clk, .rst_n, .valid(ix_valid), .f(feat[k]), .min_i(min_v[k]),
      .cs_i(cs_v[k]), .idx_q(idx_v[k]), .idx_valid()
    );
  end

  vector_bank #(.J(J), .N(N)) u_bank (
    .clk, .rst_n, .we(vec_we), .waddr(vec_waddr), .wdata(idx_v), .vec(vec)
  );

  bin_allocator #(.J(J), .N(N)) u_alloc (
    .clk, .rst_n, .start(alloc_start), .num_vec(num_vec), .vec(vec),
    .busy(), .done(alloc_done), .bin(bin), .dens(dens), .num_bins(num_bins)
  );

  link_unit #(.J(J), .N(N)) u_link (
    .clk, .rst_n, .start(link_start), .num_vec(num_vec), .vec(vec), .bin(bin), .dens(dens),
    .busy(), .done(link_done), .parent(parent)
  );

  cluster_assign #(.J(J)) u_assign (
    .clk, .rst_n, .start(assign_start), .num_vec(num_vec), .parent(parent),
    .busy(), .done(assign_done), .root(root), .peak(peak)
  );

  cluster_group #(.J(J)) u_group (
    .clk, .rst_n, .start(group_start), .num_vec(num_vec), .root(root), .peak(peak),
    .busy(), .done(group_done), .label(label), .num_clusters(num_clusters)
  );

  map_back #(.J(J)) u_map (
    .clk, .rst_n, .start(map_start), .num_vec(num_vec), .label(label),
    .busy(), .done(map_done), .we(lbl_we), .waddr(lbl_waddr), .wdata(lbl_wdata)
  );

  frame_mem #(.WIDTH(JW), .DEPTH(J)) u_labels (
    .clk, .we(lbl_we), .waddr(lbl_waddr), .wdata(lbl_wdata),
    .raddr(lbl_raddr), .rdata(lbl_rdata)
  );

endmodule
