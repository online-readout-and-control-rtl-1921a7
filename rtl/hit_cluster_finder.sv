// hit_cluster_finder: on-line hit and cluster detection of one input channel.
//
// Runs alongside the raw data write. Each sample (`valid`, strip `addr`,
// 13-bit `data` = overflow bit + 12-bit value) is compared with the
// programmable `threshold`: it is a hit if the value is above the threshold
// or the FADC overflowed. Neighbouring hits form a cluster; a width counter
// counts its hits. When the cluster ends (first non-hit, or the last strip),
// the cluster is accepted if its width is above the programmable
// `min_width`, and a one-clock pulse `ptr_we` stores {first address, width}
// into the pointer memory at `ptr_index`, the running count of accepted
// clusters. Samples must arrive in strip order.
//
// Timing: a cluster that ends on a non-hit is written on the clock edge after
// that sample; one that reaches the last strip is written on the edge after
// the last sample. `clear` starts a new event. `n_clusters` and `n_hits`
// count accepted clusters and hit samples of the event.
// The hit, cluster and acceptance rules follow the published description;
// treating overflow as a hit and the strict "above" comparisons are read
// from "bigger than" in the text.
module hit_cluster_finder #(
  parameter int unsigned STRIP_W  = 11,
  parameter int unsigned ADC_BITS = 12,
  parameter int unsigned WIDTH_W  = 12
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                clear,
  input  logic                valid,
  input  logic [STRIP_W-1:0]  addr,
  input  logic [ADC_BITS:0]   data,
  input  logic [ADC_BITS-1:0] threshold,
  input  logic [WIDTH_W-1:0]  min_width,
  output logic                ptr_we,
  output logic [STRIP_W-1:0]  ptr_index,
  output logic [STRIP_W-1:0]  ptr_first,
  output logic [WIDTH_W-1:0]  ptr_width,
  output logic [STRIP_W:0]    n_clusters,
  output logic [STRIP_W:0]    n_hits
);
  logic               hit, last;
  logic               in_cluster;
  logic [STRIP_W-1:0] first_q;
  logic [WIDTH_W-1:0] width_q, width_n;
  logic               close_now;

  assign hit  = data[ADC_BITS] || (data[ADC_BITS-1:0] > threshold);
  assign last = &addr;
  assign width_n = width_q + 1'b1;

  // cluster ends with this sample: a non-hit after hits, or a hit on the
  // last strip
  assign close_now = valid && ((in_cluster && !hit) || (hit && last));

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      in_cluster <= 1'b0;
      width_q    <= '0;
      first_q    <= '0;
      ptr_we     <= 1'b0;
      ptr_index  <= '0;
      ptr_first  <= '0;
      ptr_width  <= '0;
      n_clusters <= '0;
      n_hits     <= '0;
    end else begin
      // the index advances after each stored cluster
      if (ptr_we) ptr_index <= ptr_index + 1'b1;
      ptr_we <= 1'b0;
      if (valid) begin
        if (hit) n_hits <= n_hits + 1'b1;
        if (close_now) begin
          logic [WIDTH_W-1:0] w;
          logic [STRIP_W-1:0] f;
          w = (hit && last) ? (in_cluster ? width_n : WIDTH_W'(1)) : width_q;
          f = (in_cluster) ? first_q : addr;
          if (w > min_width && n_clusters < (STRIP_W+1)'(1 << STRIP_W)) begin
            ptr_we     <= 1'b1;
            ptr_first  <= f;
            ptr_width  <= w;
            n_clusters <= n_clusters + 1'b1;
          end
          in_cluster <= 1'b0;
          width_q    <= '0;
        end else if (hit) begin
          if (!in_cluster) first_q <= addr;
          in_cluster <= 1'b1;
          width_q    <= width_n;
        end
      end
    end
  end
endmodule
