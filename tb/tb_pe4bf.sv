// tb_pe4bf: checks one 4bF-packing PE. Random activation pairs, weight
// triples and incoming partial sums are driven; the registered partial sum
// must equal psum_in plus the six 4-bit products placed in their 11-bit
// slots, one clock after the activation was registered. Also checks the
// one-clock activation/tag pass-through and that weights change only on
// w_load.
module tb_pe4bf;
  import sa4_pkg::*;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  act_pair_t a_in, a_out;
  step_tag_t tag_in, tag_out, ptag_out;
  wtrip_t    w_in;
  logic      w_load;
  logic signed [PSUM_W-1:0] psum_in, psum_out;

  pe4bf dut (.*);

  int checks = 0, failures = 0;

  // Reference: slot sums computed from the individual 4-bit products.
  function automatic longint ref_prod(act_pair_t a, wtrip_t w);
    longint a0, a1, w1, w2, w3;
    a0 = longint'(a[3:0]); a1 = longint'(a[7:4]);
    w1 = longint'($signed(w[11:8])); w2 = longint'($signed(w[7:4])); w3 = longint'($signed(w[3:0]));
    return (w3*a0) + (w3*a1 + w2*a0) * 2048 + (w2*a1 + w1*a0) * 2048 * 2048
         + (w1*a1) * 2048 * 2048 * 2048;
  endfunction

  act_pair_t a_prev;
  step_tag_t t_prev;
  wtrip_t    w_cur;
  longint    p_prev;

  initial begin
    #1 rst_n = 0;
    a_in = '0; tag_in = '0; w_in = '0; w_load = 0; psum_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // load a first weight set
    w_in = 12'h7F8; w_load = 1;
    @(negedge clk);
    w_cur = 12'h7F8; w_load = 0;
    for (int i = 0; i < 400; i++) begin
      a_in    = act_pair_t'($urandom);
      tag_in  = step_tag_t'($urandom);
      psum_in = PSUM_W'(longint'($urandom_range(0, 2000000)) - 1000000);
      w_load  = ($urandom % 5 == 0);
      w_in    = wtrip_t'($urandom);
      @(negedge clk);
      // a_in now sits in the local register; weights loaded if w_load was set
      if (w_load) w_cur = w_in;
      checks++;
      if (a_out != a_in || tag_out != tag_in) begin
        failures++; $display("FAIL pass-through at %0d", i);
      end
      a_prev = a_in; t_prev = tag_in; p_prev = longint'(psum_in);
      // psum_out is produced from the register contents at the next edge
      psum_in = PSUM_W'(longint'($urandom_range(0, 2000000)) - 1000000);
      w_load = 0;
      @(negedge clk);
      checks++;
      if (longint'(psum_out) != longint'(psum_in) + ref_prod(a_prev, w_cur) || ptag_out != t_prev) begin
        failures++;
        if (failures < 10) $display("FAIL psum at %0d: got %0d exp %0d", i, psum_out,
                                    longint'(psum_in) + ref_prod(a_prev, w_cur));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
