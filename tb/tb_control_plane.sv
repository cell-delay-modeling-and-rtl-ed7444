// tb_control_plane: self-checking test of one scheduling plane.
//
// A model of the plane keeps, per input, the queued headers (output, RAM address)
// in arrival order and the pointers A (per input) and C (per output). In each
// cycle random headers are appended and, when the plane is active, one
// request-grant-accept iteration is computed on random unmatched masks: an output
// grants the requesting input nearest to C, an input accepts the granting output
// nearest to A, A moves past the accepted output and C past the granted input only
// on acceptance, and the accepting input gives up its oldest header for that
// output. Matches, returned addresses, queue counts and the contention and
// multi-grant flags are compared with the plane.
module tb_control_plane;
  localparam int unsigned N = 4, DEPTH = 8;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] push_en = '0;
  logic [N-1:0][1:0] push_dest = '0;
  logic [N-1:0][2:0] push_addr = '0;
  logic active = 0;
  logic [N-1:0] in_unmatched = '0, out_unmatched = '0;
  logic [N-1:0] match_valid;
  logic [N-1:0][1:0] match_out;
  logic [N-1:0][2:0] match_addr;
  logic [N-1:0][3:0] hq_count;
  logic contention, multi_grant;
  int checks = 0, failures = 0;

  typedef struct { int dest; int addr; } ent_t;
  ent_t q [N][$];
  int A [N], C [N];

  control_plane #(.N(N), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    bit req [N][N];
    int gnt [N];      // output -> granted input, -1 none
    int acc [N];      // input -> accepted output, -1 none
    int pos [N];      // input -> index in its queue of the popped header
    int n_cont = 0, n_multi = 0, n_match = 0, n_refused = 0, cnt;
    bit exp_cont, exp_multi;
    foreach (A[i]) begin A[i] = 0; C[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        push_en[i]   = (q[i].size() < DEPTH) && ($urandom_range(2) == 0);
        push_dest[i] = 2'($urandom_range(N - 1));
        push_addr[i] = 3'($urandom_range(DEPTH - 1));
      end
      active        = $urandom_range(1);
      in_unmatched  = ($urandom_range(1) == 1) ? '1 : N'($urandom);
      out_unmatched = ($urandom_range(1) == 1) ? '1 : N'($urandom);
      // model: request, grant, accept
      for (int i = 0; i < N; i++)
        for (int o = 0; o < N; o++) begin
          req[i][o] = 0;
          if (active && in_unmatched[i] && out_unmatched[o])
            foreach (q[i][e]) if (q[i][e].dest == o) req[i][o] = 1;
        end
      exp_cont = 0; exp_multi = 0;
      for (int o = 0; o < N; o++) begin
        gnt[o] = -1; cnt = 0;
        for (int k = 0; k < N; k++) begin
          int i;
          i = (C[o] + k) % N;
          if (req[i][o]) begin cnt++; if (gnt[o] < 0) gnt[o] = i; end
        end
        if (cnt > 1) exp_cont = 1;
      end
      for (int i = 0; i < N; i++) begin
        acc[i] = -1; cnt = 0;
        for (int k = 0; k < N; k++) begin
          int o;
          o = (A[i] + k) % N;
          if (gnt[o] == i) begin cnt++; if (acc[i] < 0) acc[i] = o; end
        end
        if (cnt > 1) exp_multi = 1;
      end
      #1;
      check("contention", contention == exp_cont);
      check("multi_grant", multi_grant == exp_multi);
      n_cont += exp_cont; n_multi += exp_multi;
      for (int i = 0; i < N; i++) begin
        check("hq_count", int'(hq_count[i]) == q[i].size());
        check("match_valid", match_valid[i] == (acc[i] >= 0));
        pos[i] = -1;
        if (acc[i] >= 0) begin
          check("match_out", int'(match_out[i]) == acc[i]);
          foreach (q[i][e]) if (pos[i] < 0 && q[i][e].dest == acc[i]) pos[i] = e;
          check("match_addr", int'(match_addr[i]) == q[i][pos[i]].addr);
        end
      end
      @(posedge clk);
      for (int o = 0; o < N; o++)
        if (gnt[o] >= 0) begin
          if (acc[gnt[o]] == o) C[o] = (gnt[o] + 1) % N;
          else n_refused++;
        end
      for (int i = 0; i < N; i++) begin
        if (acc[i] >= 0) begin
          A[i] = (acc[i] + 1) % N;
          q[i].delete(pos[i]);
          n_match++;
        end
        if (push_en[i]) q[i].push_back('{int'(push_dest[i]), int'(push_addr[i])});
      end
    end
    check("contention seen", n_cont > 0);
    check("multiple grants seen", n_multi > 0);
    check("refused grants seen", n_refused > 0);
    check("matches seen", n_match > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
