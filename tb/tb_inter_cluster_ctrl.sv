// tb_inter_cluster_ctrl: four model nodes of six words each (some empty) are
// exchanged. Checks that every non-empty word is sent once, in cluster and
// cell order, with its global source index; that empty words are skipped;
// that a busy neuron stalls the channel; that each cluster costs two
// reconfiguration cycles; and that a stall-free exchange takes 57 cycles
// (4 x (2 + 6 x 2) + 1).
module tb_inter_cluster_ctrl;
  localparam int NCL = 4, NC = 6;
  logic clk = 0, rst_n = 0, start = 0, nodes_busy = 0;
  logic [15:0] hub_rdata [NCL];
  logic [5:0] hub_raddr;
  logic spk_valid, done, busy, ev_reconf, ev_stall;
  logic [4:0] spk_src;
  logic [15:0] spk_stamp;
  logic [15:0] words [NCL][NC];
  int checks = 0, failures = 0, reconfs = 0, stalls = 0;
  int exp_src [$];
  int got_src [$];
  logic [15:0] got_stamp [$];

  inter_cluster_ctrl #(.N_CLUSTERS(NCL), .N_CELLS(NC)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model node register files: one-cycle read latency
  always_ff @(posedge clk)
    for (int c = 0; c < NCL; c++) hub_rdata[c] <= words[c][hub_raddr % NC];

  always @(posedge clk) begin
    if (spk_valid) begin
      got_src.push_back(int'(spk_src));
      got_stamp.push_back(spk_stamp);
      checks++;
      if (nodes_busy) begin failures++; $display("FAIL sent while busy"); end
    end
    if (ev_reconf) reconfs++;
    if (ev_stall) stalls++;
  end

  initial begin
    int cyc;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 12; r++) begin
      bit use_busy;
      use_busy = (r % 2 == 1);
      exp_src = {}; got_src = {}; got_stamp = {};
      reconfs = 0;
      for (int c = 0; c < NCL; c++)
        for (int k = 0; k < NC; k++) begin
          words[c][k] = (($urandom % 3) == 0) ? 16'd0 : 16'(1 + $urandom % 1000);
          if (words[c][k] != 0) exp_src.push_back(c * NC + k);
        end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin
        nodes_busy = use_busy ? 1'($urandom) : 1'b0;
        @(negedge clk); cyc++;
      end
      nodes_busy = 0;
      checks++;
      if (!use_busy && cyc != 57) begin failures++; $display("FAIL exchange took %0d", cyc); end
      checks++;
      if (reconfs != NCL) begin failures++; $display("FAIL reconfigurations %0d", reconfs); end
      checks++;
      if (got_src.size() != exp_src.size()) begin
        failures++; $display("FAIL sent %0d words, expected %0d", got_src.size(), exp_src.size());
      end else begin
        foreach (exp_src[i]) begin
          checks++;
          if (got_src[i] != exp_src[i] ||
              got_stamp[i] != words[exp_src[i] / NC][exp_src[i] % NC]) begin
            failures++; $display("FAIL word %0d: src %0d", i, got_src[i]);
          end
        end
      end
    end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no stall seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
