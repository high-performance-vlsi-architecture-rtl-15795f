// Reference model of the histogram peak-climbing clustering, for the testbenches.
//
// Works directly from the algorithm, vector by vector, without the processor's
// sweeps: per-dimension range, cell size floor(range * ceil(2^17/Q) / 2^17) + 1,
// cell index (f - min) / cs, bins of equal index vectors (named by their first
// vector), links to the lowest-numbered densest neighbouring bin denser than
// itself, chains followed to the peaks, peaks labelled in vector order.
// Bins are found with an associative array and links by comparing bin heads
// only, so that the model stays fast for a full frame of clustered data.
package cluster_model_pkg;

  class cluster_model;
    int n, j, q;
    int feat [][];            // [j][n], signed 16-bit values
    int label [];             // result: cluster label per vector
    int num_clusters, num_bins, num_links, max_depth;

    function new(int j_, int n_);
      j = j_;
      n = n_;
      feat = new[j];
      foreach (feat[i]) feat[i] = new[n];
      label = new[j];
    endfunction

    function void run(int q_);
      int mn [], mx [], cs [];
      longint key_idx [];
      int bin_of [], dens [], parent [], peak_label [];
      int heads [$];
      int head_of_key [longint];
      int idx [][];
      q = q_;
      mn = new[n]; mx = new[n]; cs = new[n];
      for (int k = 0; k < n; k++) begin
        mn[k] = 32767; mx[k] = -32768;
        for (int v = 0; v < j; v++) begin
          if (feat[v][k] < mn[k]) mn[k] = feat[v][k];
          if (feat[v][k] > mx[k]) mx[k] = feat[v][k];
        end
        cs[k] = int'((longint'(mx[k] - mn[k]) * (((longint'(1) << 17) + q - 1) / q)) >> 17) + 1;
      end
      idx = new[j];
      key_idx = new[j];
      bin_of = new[j]; dens = new[j]; parent = new[j]; peak_label = new[j];
      for (int v = 0; v < j; v++) begin
        idx[v] = new[n];
        key_idx[v] = 0;
        for (int k = 0; k < n; k++) begin
          int d = (feat[v][k] - mn[k]) / cs[k];
          if (d > 7) d = 7;
          idx[v][k] = d;
          key_idx[v] = key_idx[v] * 8 + d;   // only used as a hash key below
        end
      end
      // bins; the key is exact for n <= 21, otherwise equality is re-checked
      for (int v = 0; v < j; v++) begin
        bin_of[v] = -1;
        dens[v] = 0;
      end
      for (int v = 0; v < j; v++) begin
        if (head_of_key.exists(key_idx[v])) begin
          int h = head_of_key[key_idx[v]];
          bit same = 1'b1;
          for (int k = 0; k < n; k++) if (idx[h][k] != idx[v][k]) same = 1'b0;
          if (same) begin
            bin_of[v] = h;
            dens[h]++;
          end
        end
        if (bin_of[v] < 0) begin
          // linear search among heads for an exact match (hash collision case)
          foreach (heads[i]) begin
            bit same = 1'b1;
            for (int k = 0; k < n; k++) if (idx[heads[i]][k] != idx[v][k]) same = 1'b0;
            if (same && bin_of[v] < 0) begin bin_of[v] = heads[i]; dens[heads[i]]++; end
          end
        end
        if (bin_of[v] < 0) begin
          bin_of[v] = v;
          dens[v] = 1;
          heads.push_back(v);
          if (!head_of_key.exists(key_idx[v])) head_of_key[key_idx[v]] = v;
        end
      end
      num_bins = heads.size();
      // links between bin heads
      num_links = 0;
      foreach (heads[a]) begin
        int h = heads[a];
        int best = dens[h];
        parent[h] = h;
        foreach (heads[b]) begin
          int g = heads[b];
          bit nb = 1'b1;
          for (int k = 0; k < n; k++) begin
            int dd = idx[g][k] - idx[h][k];
            if (dd > 1 || dd < -1) nb = 1'b0;
          end
          if (nb && dens[g] > best) begin best = dens[g]; parent[h] = g; end
        end
        if (parent[h] != h) num_links++;
      end
      // peaks and their labels
      num_clusters = 0;
      foreach (heads[a]) begin
        if (parent[heads[a]] == heads[a]) begin
          peak_label[heads[a]] = num_clusters;
          num_clusters++;
        end
      end
      // each vector: climb from its bin head to the peak
      max_depth = 0;
      for (int v = 0; v < j; v++) begin
        int r = bin_of[v];
        int depth = 0;
        while (parent[r] != r) begin r = parent[r]; depth++; end
        if (depth > max_depth) max_depth = depth;
        label[v] = peak_label[r];
      end
    endfunction
  endclass

endpackage
