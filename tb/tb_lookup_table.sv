// tb_lookup_table - configures the three-neuron example network (neuron 1
// and 2 on this board, neuron 3 elsewhere) and reads every column and list
// entry back through the one-cycle read ports.
module tb_lookup_table;
  import stdp_pkg::*;
  logic clk = 0;
  logic cfg_col_we = 0, cfg_list_we = 0;
  addr_t cfg_col_addr = '0, cfg_list_data = '0, col_raddr = '0, list_rdata;
  lut_col_t cfg_col = '0, col_rdata;
  lptr_t cfg_list_addr = '0, list_raddr = '0;
  int checks = 0, failures = 0;

  lookup_table #(.N(8), .LDEPTH(64)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected contents: neurons at addresses 0,1,2
  lut_col_t cols [3];
  addr_t    lists [8];
  addr_t    exp_a;

  initial begin
    // post lists: 0:{1} 1:{2} 2:{0,1}; pre lists: 0:{2} 1:{0,2} 2:{1}
    lists = '{1, 2, 0, 1, 2, 0, 2, 1};
    cols[0] = '{is_local: 1, excitatory: 1, post_base: 0, post_len: 1, pre_base: 4, pre_len: 1};
    cols[1] = '{is_local: 1, excitatory: 0, post_base: 1, post_len: 1, pre_base: 5, pre_len: 2};
    cols[2] = '{is_local: 0, excitatory: 1, post_base: 2, post_len: 2, pre_base: 7, pre_len: 1};
    @(negedge clk);
    for (int i = 0; i < 3; i++) begin
      cfg_col_we = 1; cfg_col_addr = addr_t'(i); cfg_col = cols[i]; @(negedge clk);
    end
    cfg_col_we = 0;
    foreach (lists[i]) begin
      cfg_list_we = 1; cfg_list_addr = lptr_t'(i); cfg_list_data = lists[i]; @(negedge clk);
    end
    cfg_list_we = 0;
    for (int i = 0; i < 3; i++) begin
      col_raddr = addr_t'(i); @(negedge clk);
      chk(col_rdata == cols[i], $sformatf("column %0d", i));
      // walk the lists of this column
      for (int k = 0; k < int'(cols[i].post_len); k++) begin
        list_raddr = cols[i].post_base + lptr_t'(k); @(negedge clk);
        exp_a = lists[int'(cols[i].post_base) + k];
        chk(list_rdata == exp_a, "post entry");
      end
      for (int k = 0; k < int'(cols[i].pre_len); k++) begin
        list_raddr = cols[i].pre_base + lptr_t'(k); @(negedge clk);
        exp_a = lists[int'(cols[i].pre_base) + k];
        chk(list_rdata == exp_a, "pre entry");
      end
    end
    // read latency: data change one edge after the address
    col_raddr = 0; @(negedge clk);
    col_raddr = 2; #1;
    chk(col_rdata == cols[0], "old data before the edge");
    @(negedge clk);
    chk(col_rdata == cols[2], "new data after the edge");
    // prune a synapse: shorten list of neuron 2
    cols[2].post_len = 1;
    cfg_col_we = 1; cfg_col_addr = 2; cfg_col = cols[2]; @(negedge clk); cfg_col_we = 0;
    col_raddr = 2; @(negedge clk);
    chk(col_rdata.post_len == 1, "pruned entry");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
