// tb_ref_pkg: reference models shared by the testbenches.
//
// ref_cluster_word computes a bank's 16-bit cluster word by walking the
// strips and measuring run lengths (a different method from the parallel
// start-detect logic of the finder): runs of 1 or 2 hit strips are
// clusters, longer runs are skipped; the first cluster found goes in the
// upper byte, the last in the lower byte, FF where there is none.
// rand_bank makes random banks of up to max_runs runs of 1 to 4 strips, so
// vetoed runs and runs that touch the bank edges both occur.
package tb_ref_pkg;

  function automatic logic [15:0] ref_cluster_word(logic [127:0] h);
    int n;
    logic [7:0] first_c, last_c;
    int i, j;
    n = 0;
    first_c = 8'hFF;
    last_c  = 8'hFF;
    i = 0;
    while (i < 128) begin
      if (h[i]) begin
        j = i;
        while (j < 128 && h[j]) j++;
        if (j - i <= 2) begin
          if (n == 0) first_c = {7'(i), (j - i == 2) ? 1'b1 : 1'b0};
          else        last_c  = {7'(i), (j - i == 2) ? 1'b1 : 1'b0};
          n++;
        end
        i = j;
      end else begin
        i++;
      end
    end
    return {first_c, last_c};
  endfunction

  // Random bank pattern: a few hits, runs of 1 to 4 strips.
  function automatic logic [127:0] rand_bank(int max_runs);
    logic [127:0] h;
    int runs, pos, len;
    h = '0;
    runs = $urandom_range(max_runs, 0);
    for (int r = 0; r < runs; r++) begin
      pos = $urandom_range(127, 0);
      len = $urandom_range(4, 1);
      for (int k = 0; k < len; k++)
        if (pos + k < 128) h[pos + k] = 1'b1;
    end
    return h;
  endfunction

endpackage
