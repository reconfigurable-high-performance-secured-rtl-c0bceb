// tb_cluster_separation_module: random packets with random cluster bit and
// random back-pressure from the two clusters; every packet must come out,
// in order, at the cluster its header bit 11 selects, one cycle after it
// is accepted at the earliest.
module tb_cluster_separation_module;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  pkt_t in_pkt = '0, out_pkt;
  logic [1:0] out_valid, out_ready = 0;
  int checks = 0, failures = 0, sent = 0, got = 0;
  pkt_t q[$];
  localparam int NPKT = 300;

  cluster_separation_module #(.N_CLUSTERS(2)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // source
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (sent < NPKT) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      in_pkt.hdr.cluster = 1'($urandom); in_pkt.data = $urandom; in_pkt.hdr.dst_x = 2'($urandom);
      #1;
      @(posedge clk);
      if (in_valid && in_ready) begin q.push_back(in_pkt); sent++; end
    end
    @(negedge clk) in_valid = 0;
  end

  // sinks
  always @(negedge clk) out_ready <= 2'($urandom);
  always @(posedge clk) begin
    if (rst_n) begin
      for (int c = 0; c < 2; c++) begin
        if (out_valid[c] && out_ready[c]) begin
          pkt_t e;
          e = q.pop_front();
          got++;
          checks++;
          if (out_pkt != e || int'(e.hdr.cluster) != c || out_valid[1-c]) begin
            failures++; $display("FAIL pkt %0d at cluster %0d", got, c);
          end
        end
      end
    end
  end

  initial begin
    wait (got == NPKT);
    repeat (3) @(posedge clk);
    checks++;
    if (out_valid != 0) begin failures++; $display("FAIL extra output"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
