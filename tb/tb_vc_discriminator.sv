// tb_vc_discriminator: self-checking test of the virtual-path discriminator.
//
// Fills part of the connection table with random (class, output) entries, keeps a
// shadow copy, and then presents cells on random paths (provisioned and not). The
// class, destination and known/unknown flags must match the shadow table. Also
// checks that reset leaves every path unprovisioned and that an entry can be
// withdrawn again.
module tb_vc_discriminator;
  import atm_pkg::*;
  localparam int unsigned N = 16, NC = 5;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0, cfg_valid = 0;
  logic [VPI_W-1:0] cfg_vpi = '0;
  logic [2:0] cfg_cls = '0;
  logic [3:0] cfg_dest = '0;
  logic in_valid = 0;
  logic [CELL_W-1:0] in_cell = '0;
  logic out_valid, out_unknown;
  logic [2:0] out_cls;
  logic [3:0] out_dest;
  int checks = 0, failures = 0;

  typedef struct { bit valid; int cls; int dest; } ent_t;
  ent_t shadow [256];

  vc_discriminator #(.N(N), .NUM_CLASSES(NC)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic probe(int vpi, bit valid);
    in_valid = valid;
    in_cell  = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    in_cell[VPI_MSB -: VPI_W] = VPI_W'(vpi);
    #1;
    check($sformatf("valid vpi=%0d", vpi), out_valid == (valid && shadow[vpi].valid));
    check($sformatf("unknown vpi=%0d", vpi), out_unknown == (valid && !shadow[vpi].valid));
    if (valid && shadow[vpi].valid) begin
      check($sformatf("cls vpi=%0d", vpi), int'(out_cls) == shadow[vpi].cls);
      check($sformatf("dest vpi=%0d", vpi), int'(out_dest) == shadow[vpi].dest);
    end
  endtask

  initial begin
    foreach (shadow[v]) shadow[v] = '{0, 0, 0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int v = 0; v < 256; v += 7) probe(v, 1);
    // provision random paths
    for (int k = 0; k < 120; k++) begin
      @(negedge clk);
      cfg_we = 1;
      cfg_vpi = VPI_W'($urandom_range(255));
      cfg_valid = 1;
      cfg_cls = 3'($urandom_range(NC - 1));
      cfg_dest = 4'($urandom_range(N - 1));
      shadow[cfg_vpi] = '{1, int'(cfg_cls), int'(cfg_dest)};
    end
    @(negedge clk) cfg_we = 0;
    for (int k = 0; k < 600; k++) probe($urandom_range(255), $urandom_range(3) != 0);
    // withdraw some paths
    for (int k = 0; k < 40; k++) begin
      @(negedge clk);
      cfg_we = 1; cfg_valid = 0; cfg_vpi = VPI_W'($urandom_range(255));
      shadow[cfg_vpi].valid = 0;
    end
    @(negedge clk) cfg_we = 0;
    for (int v = 0; v < 256; v++) probe(v, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
