// Map-back of cluster labels to the spatial domain.
//
// Vector j was extracted from window j of the frame (raster order), so mapping
// back writes label[j] to address j of the output label matrix. A counter steps j
// over 0..num_vec-1 and a multiplexer selects the label: one write per cycle.
// Only the first num_vec labels are written.
// Timing: start (while idle) begins; we is high for num_vec cycles with busy; done
// pulses for one cycle after the last write.
module map_back #(
  parameter int unsigned J  = cluster_pkg::J_VEC,
  localparam int unsigned JW = cluster_pkg::id_width(J)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [JW:0]   num_vec,   // vectors in this frame, 1..J
  input  logic [JW-1:0] label [J],
  output logic          busy,
  output logic          done,
  output logic          we,
  output logic [JW-1:0] waddr,
  output logic [JW-1:0] wdata
);

  assign we    = busy;
  assign wdata = label[waddr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      waddr <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy  <= 1'b1;
          waddr <= '0;
        end
      end else if (waddr == JW'(num_vec - 1'b1)) begin
        busy <= 1'b0;
        done <= 1'b1;
      end else begin
        waddr <= waddr + 1'b1;
      end
    end
  end

endmodule
