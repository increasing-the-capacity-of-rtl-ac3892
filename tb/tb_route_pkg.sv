// Routing helpers for the network testbenches.
//
// shuffle        a random permutation of 0..n-1
// assign_slots   gives every connection (src line -> dst line) an internal
//                slot that is free on both lines. With 2*CH internal slots
//                and CH connections per line a free slot always exists
//                (2*CH > 2*(CH-1)), which is why the doubled internal rate
//                makes the TST network non-blocking.
// complete_maps  extends the partial line mapping of every slot to a full
//                permutation, so idle inputs never collide with used ones
// clos_route     routes a full 64-line permutation through the SSS 8-16-8
//                network: each connection takes a middle element free on
//                both its first- and third-stage element (16 >= 2*8-1, so
//                one is always free), and the three select words are built
package tb_route_pkg;

  function automatic void shuffle(int n, output int p[]);
    p = new[n];
    for (int i = 0; i < n; i++) p[i] = i;
    for (int i = n - 1; i > 0; i--) begin
      int j = int'($urandom % (i + 1));
      int t = p[i]; p[i] = p[j]; p[j] = t;
    end
  endfunction

  // src[c], dst[c]: lines of connection c; returns slot k[c] in 0..nslot-1
  function automatic bit assign_slots(int nlines, int nslot, int src[], int dst[],
                                      output int k[]);
    bit used_s [] = new[nlines * nslot];
    bit used_d [] = new[nlines * nslot];
    int start;
    k = new[src.size()];
    for (int c = 0; c < src.size(); c++) begin
      k[c] = -1;
      start = int'($urandom % nslot);
      for (int d = 0; d < nslot; d++) begin
        int s = (start + d) % nslot;
        if (!used_s[src[c]*nslot + s] && !used_d[dst[c]*nslot + s]) begin
          k[c] = s; used_s[src[c]*nslot + s] = 1; used_d[dst[c]*nslot + s] = 1;
          break;
        end
      end
      if (k[c] < 0) return 0;
    end
    return 1;
  endfunction

  // map[slot*nlines + a] = b or -1 on entry; every -1 filled on return
  function automatic void complete_maps(int nlines, int nslot, ref int map[]);
    for (int s = 0; s < nslot; s++) begin
      bit taken [] = new[nlines];
      for (int a = 0; a < nlines; a++)
        if (map[s*nlines + a] >= 0) taken[map[s*nlines + a]] = 1;
      for (int a = 0; a < nlines; a++)
        if (map[s*nlines + a] < 0)
          for (int b = 0; b < nlines; b++)
            if (!taken[b]) begin map[s*nlines + a] = b; taken[b] = 1; break; end
    end
  endfunction

  function automatic bit clos_route(int perm[], output logic [31:0] s1[8],
                                    output logic [23:0] s2[16], output logic [47:0] s3[8]);
    bit u1 [8][16];
    bit u3 [8][16];
    for (int i = 0; i < 8; i++)  begin s1[i] = '0; s3[i] = '0; end
    for (int m = 0; m < 16; m++) s2[m] = '0;
    for (int i = 0; i < 8; i++) for (int m = 0; m < 16; m++) begin u1[i][m] = 0; u3[i][m] = 0; end
    for (int x = 0; x < 64; x++) begin
      int a = x / 8, c = perm[x] / 8, mid = -1;
      for (int m = 0; m < 16; m++) if (!u1[a][m] && !u3[c][m]) begin mid = m; break; end
      if (mid < 0) return 0;
      u1[a][mid] = 1; u3[c][mid] = 1;
      s1[a][4*(x % 8) +: 4]  = 4'(mid);
      s2[mid][3*a +: 3]      = 3'(c);
      s3[c][3*mid +: 3]      = 3'(perm[x] % 8);
    end
    return 1;
  endfunction

endpackage
