// Test of the master-slave Batcher network with 16 and 4 ports.
// Master: random distinct keys with payloads must come out in ascending key
// order with each payload still beside its key. Slave: driven with the
// master's swap decisions and data tagged by bank number, output p must
// carry the tag of the bank that MAP p's key was sorted to.
// Also checks the QPP case: keys pi(p*Ks + j) for K = 6144, Ks = 384.
module tb_batcher_net;
  int checks = 0, failures = 0;

  localparam int N = 16, KW = 14, DW = 9, SW = 12;
  localparam int S = 10;
  logic [N-1:0][KW-1:0] m_key, m_key_o;
  logic [N-1:0][DW-1:0] m_data, m_data_o;
  logic [S-1:0][N-1:0]  m_sel;
  logic [N-1:0][SW-1:0] s_data, s_data_o;

  batcher_net #(.N(N), .KW(KW), .DW(DW), .SW(SW)) dut (
    .m_key, .m_data, .m_key_o, .m_data_o, .m_sel,
    .s_sel(m_sel), .s_data, .s_data_o
  );

  localparam int N4 = 4, S4 = 3;
  logic [N4-1:0][KW-1:0] k4, k4o;
  logic [N4-1:0][DW-1:0] d4, d4o;
  logic [S4-1:0][N4-1:0] sel4;
  logic [N4-1:0][SW-1:0] sd4, sd4o;

  batcher_net #(.N(N4), .KW(KW), .DW(DW), .SW(SW)) dut4 (
    .m_key(k4), .m_data(d4), .m_key_o(k4o), .m_data_o(d4o), .m_sel(sel4),
    .s_sel(sel4), .s_data(sd4), .s_data_o(sd4o)
  );

  task automatic check16();
    int rank [N];
    for (int i = 0; i < N; i++) m_data[i] = DW'(i * 7 + 3);
    for (int b = 0; b < N; b++) s_data[b] = SW'(100 + b);
    #1;
    for (int i = 0; i < N; i++) begin
      rank[i] = 0;
      for (int j = 0; j < N; j++) if (m_key[j] < m_key[i]) rank[i]++;
    end
    for (int i = 0; i < N; i++) begin
      checks += 3;
      if (i > 0 && m_key_o[i] < m_key_o[i-1]) begin failures++; $display("FAIL order at %0d", i); end
      if (m_key_o[rank[i]] != m_key[i] || m_data_o[rank[i]] != m_data[i]) begin
        failures++; $display("FAIL payload of key %0d", m_key[i]);
      end
      if (s_data_o[i] != SW'(100 + rank[i])) begin
        failures++; $display("FAIL slave out %0d: %0d expected %0d", i, s_data_o[i], 100 + rank[i]);
      end
    end
  endtask

  initial begin
    for (int n = 0; n < 500; n++) begin
      // random permutation of distinct keys
      int perm [N];
      for (int i = 0; i < N; i++) perm[i] = i;
      for (int i = N - 1; i > 0; i--) begin
        int j, t;
        j = $urandom_range(i); t = perm[i]; perm[i] = perm[j]; perm[j] = t;
      end
      for (int i = 0; i < N; i++) m_key[i] = KW'(perm[i] * 384 + (n % 384));
      check16();
      // 4-port network
      for (int i = 0; i < N4; i++) begin k4[i] = KW'(perm[i] % 16 * 50 + i); d4[i] = DW'(i); sd4[i] = SW'(i); end
      #1;
      for (int i = 0; i < N4; i++) begin
        int r;
        r = 0;
        for (int j = 0; j < N4; j++) if (k4[j] < k4[i]) r++;
        checks += 2;
        if (k4o[r] != k4[i] || d4o[r] != d4[i]) begin failures++; $display("FAIL 4-port master"); end
        if (sd4o[i] != SW'(r)) begin failures++; $display("FAIL 4-port slave"); end
      end
    end
    for (int j = 0; j < 384; j++) begin
      for (int p = 0; p < N; p++) begin
        longint i;
        i = p * 384 + j;
        m_key[p] = KW'((263 * i + 480 * i * i) % 6144);
      end
      check16();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
