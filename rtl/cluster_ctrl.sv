// Global controller of the clustering processor.
//
// Runs one frame through the phases in order:
//   MIN, MAX  read the num_vec vectors of the frame memory once per pass and feed every
//             dimension's min-max PE (min pass first, then max pass);
//   CS        wait for the last sample to land, then capture the cell sizes;
//   INDEX     read the frame a third time; the index PEs' results are written to
//             the vector bank two cycles after each read address;
//   ALLOC, LINK, ASSIGN, GROUP, MAP
//             start each stage with a one-cycle pulse and wait for its done pulse.
// The frame memory has one cycle of read latency, so the controller delays the
// read request by one cycle (data_*) to qualify the arriving data, and by two
// cycles for the vector-bank write. start is accepted in PH_IDLE; done pulses for
// one cycle when the labels are all written. The sequencing and handshakes are
// this design's own choices; the phase order follows the dataflow of the design.
// num_vec (1..J) must be held stable while busy.
module cluster_ctrl #(
  parameter int unsigned J  = cluster_pkg::J_VEC,
  localparam int unsigned JW = cluster_pkg::id_width(J)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [JW:0]           num_vec,   // vectors in the frame, 1..J
  // frame memory read side
  output logic [JW-1:0]         rd_addr,
  // min-max PEs
  output logic                  mm_init,
  output logic                  mm_valid,
  output logic                  mm_refs,
  // cell-size and index PEs
  output logic                  cs_load,
  output logic                  ix_valid,
  // vector bank write
  output logic                  vec_we,
  output logic [JW-1:0]         vec_waddr,
  // stage handshakes
  output logic                  alloc_start,
  input  logic                  alloc_done,
  output logic                  link_start,
  input  logic                  link_done,
  output logic                  assign_start,
  input  logic                  assign_done,
  output logic                  group_start,
  input  logic                  group_done,
  output logic                  map_start,
  input  logic                  map_done,
  // status
  output logic                  busy,
  output logic                  done,
  output cluster_pkg::phase_e   phase
);

  import cluster_pkg::*;

  logic          kick;             // first cycle of a stage phase
  logic [1:0]    wait_cnt;
  logic          req_valid, req_refs, req_idx;
  logic          d1_valid, d1_refs, d1_idx;
  logic [JW-1:0] d1_addr;
  logic          d2_we;
  logic [JW-1:0] d2_addr;
  logic          last_addr;
  logic          last_idx_sent;    // index pass issued all its reads, draining

  assign last_addr = (rd_addr == JW'(num_vec - 1'b1));

  // read request of the current cycle
  always_comb begin
    req_valid = (phase == PH_MIN) || (phase == PH_MAX) || (phase == PH_INDEX && !last_idx_sent);
    req_refs  = (phase == PH_MAX);
    req_idx   = (phase == PH_INDEX);
  end

  assign mm_init      = (phase == PH_IDLE) && start;
  assign mm_valid     = d1_valid && !d1_idx;
  assign mm_refs      = d1_refs;
  assign ix_valid     = d1_valid && d1_idx;
  assign vec_we       = d2_we;
  assign vec_waddr    = d2_addr;
  assign cs_load      = (phase == PH_CS) && (wait_cnt == 2'd1);
  assign alloc_start  = kick && (phase == PH_ALLOC);
  assign link_start   = kick && (phase == PH_LINK);
  assign assign_start = kick && (phase == PH_ASSIGN);
  assign group_start  = kick && (phase == PH_GROUP);
  assign map_start    = kick && (phase == PH_MAP);
  assign busy         = (phase != PH_IDLE);

  // read pipeline: one cycle for the memory, one more for the index PE register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d1_valid <= 1'b0;
      d1_refs  <= 1'b0;
      d1_idx   <= 1'b0;
      d1_addr  <= '0;
      d2_we    <= 1'b0;
      d2_addr  <= '0;
    end else begin
      d1_valid <= req_valid;
      d1_refs  <= req_refs;
      d1_idx   <= req_idx;
      d1_addr  <= rd_addr;
      d2_we    <= d1_valid && d1_idx;
      d2_addr  <= d1_addr;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase         <= PH_IDLE;
      rd_addr       <= '0;
      kick          <= 1'b0;
      wait_cnt      <= '0;
      last_idx_sent <= 1'b0;
      done          <= 1'b0;
    end else begin
      kick <= 1'b0;
      done <= 1'b0;
      unique case (phase)
        PH_IDLE: if (start) begin
          phase   <= PH_MIN;
          rd_addr <= '0;
        end
        PH_MIN: begin
          rd_addr <= last_addr ? '0 : rd_addr + 1'b1;
          if (last_addr) phase <= PH_MAX;
        end
        PH_MAX: begin
          rd_addr <= last_addr ? '0 : rd_addr + 1'b1;
          if (last_addr) begin
            phase    <= PH_CS;
            wait_cnt <= '0;
          end
        end
        PH_CS: begin
          // cycle 0: last max sample arrives; cycle 1: cs_load
          wait_cnt <= wait_cnt + 1'b1;
          if (wait_cnt == 2'd1) begin
            phase         <= PH_INDEX;
            rd_addr       <= '0;
            last_idx_sent <= 1'b0;
            wait_cnt      <= '0;
          end
        end
        PH_INDEX: begin
          if (!last_idx_sent) begin
            if (last_addr) last_idx_sent <= 1'b1;
            else           rd_addr <= rd_addr + 1'b1;
          end else begin
            // two cycles for the last index to reach the vector bank
            wait_cnt <= wait_cnt + 1'b1;
            if (wait_cnt == 2'd2) begin
              phase <= PH_ALLOC;
              kick  <= 1'b1;
            end
          end
        end
        PH_ALLOC: if (alloc_done) begin
          phase <= PH_LINK;
          kick  <= 1'b1;
        end
        PH_LINK: if (link_done) begin
          phase <= PH_ASSIGN;
          kick  <= 1'b1;
        end
        PH_ASSIGN: if (assign_done) begin
          phase <= PH_GROUP;
          kick  <= 1'b1;
        end
        PH_GROUP: if (group_done) begin
          phase <= PH_MAP;
          kick  <= 1'b1;
        end
        PH_MAP: if (map_done) begin
          phase <= PH_DONE;
        end
        PH_DONE: begin
          phase <= PH_IDLE;
          done  <= 1'b1;
        end
        default: phase <= PH_IDLE;
      endcase
    end
  end

endmodule
