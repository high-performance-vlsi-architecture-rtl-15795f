// Cluster assignment: every vector follows the links up to its peak.
//
// One PE per vector holds a pointer, loaded with the vector's parent at start; a
// vector that is its own parent is a peak (peak flag). A counter steps t over
// 0..num_vec-1 and broadcasts vector t's pointer; every PE pointing at t takes over
// that pointer, which skips one or more links. One sweep is enough: before cycle t
// no pointer rests on a non-peak vector numbered below t, so the pointer
// broadcast for t is a peak or a vector still to come, and after the last cycle
// every pointer rests on a peak. root[j] is then the peak of vector j's cluster.
// Only vectors 0..num_vec-1 are swept and can be peaks.
// Timing: start (while idle) loads the parents; the num_vec-cycle sweep follows with
// busy high; done pulses for one cycle after the last step.
// The sweep scheme is this design's own; the stage keeps the broadcast structure
// of the allocation stage.
module cluster_assign #(
  parameter int unsigned J  = cluster_pkg::J_VEC,
  localparam int unsigned JW = cluster_pkg::id_width(J)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [JW:0]   num_vec,   // vectors in this frame, 1..J
  input  logic [JW-1:0] parent [J],
  output logic          busy,
  output logic          done,
  output logic [JW-1:0] root   [J],
  output logic [J-1:0]  peak
);

  logic [JW-1:0] t;
  logic [JW-1:0] ref_ptr;

  assign ref_ptr = root[t];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < J; j++) begin
        root[j] <= '0;
        peak[j] <= 1'b0;
      end
    end else if (start && !busy) begin
      for (int j = 0; j < J; j++) begin
        root[j] <= parent[j];
        peak[j] <= (32'(parent[j]) == j) && (32'(j) < 32'(num_vec));
      end
    end else if (busy) begin
      for (int j = 0; j < J; j++) begin
        if (root[j] == t) root[j] <= ref_ptr;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t    <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          t    <= '0;
        end
      end else if (t == JW'(num_vec - 1'b1)) begin
        busy <= 1'b0;
        done <= 1'b1;
      end else begin
        t <= t + 1'b1;
      end
    end
  end

endmodule
