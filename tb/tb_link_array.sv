// tb_link_array: self-checking test of the segmented links.
// Random drivers, cuts and words on every link; the expected value seen at
// each connector from each side and the conflict flag are computed by
// splitting each link into its segments and searching each segment for its
// drivers, independently of the chain structure of the block.
module tb_link_array;
  import cgri_pkg::*;
  localparam int unsigned N = 10;

  logic  [N_LINKS-1:0] drive       [N];
  logic  [N_LINKS-1:0] cut         [N];
  word_t               data        [N][N_LINKS];
  word_t               from_left   [N][N_LINKS];
  word_t               from_right  [N][N_LINKS];
  logic  [N_LINKS-1:0] valid_left  [N];
  logic  [N_LINKS-1:0] valid_right [N];
  logic                conflict;
  int checks = 0, failures = 0;
  int n_conflicts = 0, n_multi = 0;

  link_array #(.N_CONT(N)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // first connector of the segment containing p on link s
  function automatic int seg_start(int p, int s);
    int q = p;
    while (q > 0 && !cut[q][s]) q--;
    return q;
  endfunction

  initial begin
    for (int t = 0; t < 3000; t++) begin
      automatic bit exp_conf = 1'b0;
      automatic int mode = t % 3;  // 0: sparse drivers, 1: one per segment, 2: dense
      for (int p = 0; p < int'(N); p++)
        for (int s = 0; s < int'(N_LINKS); s++) begin
          cut[p][s]   = ($urandom_range(0, 2) == 0);
          drive[p][s] = (mode == 2) ? ($urandom_range(0, 1) == 1)
                                    : ($urandom_range(0, 5) == 0);
          data[p][s]  = $urandom;
        end
      if (mode == 1) begin
        // keep at most one driver per segment
        for (int s = 0; s < int'(N_LINKS); s++)
          for (int p = 1; p < int'(N); p++)
            if (drive[p][s])
              for (int q = seg_start(p, s); q < p; q++) drive[q][s] = 1'b0;
      end
      #1;
      for (int s = 0; s < int'(N_LINKS); s++) begin
        automatic int segs = 0;
        for (int p = 0; p < int'(N); p++) begin
          automatic int a = seg_start(p, s);
          automatic int b = p;
          automatic word_t el = '0, er = '0;
          automatic bit vl = 1'b0, vr = 1'b0;
          automatic int ndrv = 0;
          while (b + 1 < int'(N) && !cut[b+1][s]) b++;
          // nearest driver on the left within [a, p-1]
          for (int q = p - 1; q >= a; q--) if (drive[q][s]) begin el = data[q][s]; vl = 1'b1; break; end
          // nearest driver on the right within [p+1, b]
          for (int q = p + 1; q <= b; q++) if (drive[q][s]) begin er = data[q][s]; vr = 1'b1; break; end
          for (int q = a; q <= b; q++) if (drive[q][s]) ndrv++;
          if (ndrv > 1) exp_conf = 1'b1;
          if (p == a && ndrv == 1) segs++;
          checks += 4;
          if (from_left[p][s] !== el)   failures++;
          if (valid_left[p][s] !== vl)  failures++;
          if (from_right[p][s] !== er)  failures++;
          if (valid_right[p][s] !== vr) failures++;
        end
        if (segs > 1) n_multi++;
      end
      checks++;
      if (conflict !== exp_conf) begin
        failures++;
        if (failures < 10) $display("t=%0d conflict %b exp %b", t, conflict, exp_conf);
      end
      if (exp_conf) n_conflicts++;
    end
    // both the conflict case and links carrying several transfers at once
    checks += 2;
    if (n_conflicts == 0) failures++;
    if (n_multi == 0) failures++;
    $display("conflicts=%0d multi-transfer links=%0d", n_conflicts, n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
