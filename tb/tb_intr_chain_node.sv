// tb_intr_chain_node: a chain of three nodes (unit 0 nearest the EXU).
// For every combination of requests and acknowledge, exactly the first
// requesting unit is granted, and the acknowledge leaves the chain only
// when no unit requests.
module tb_intr_chain_node;
  logic [2:0] req;
  logic       ack;
  logic [2:0] grant;
  logic [3:0] a;
  int checks = 0, failures = 0;

  assign a[0] = ack;
  for (genvar u = 0; u < 3; u++) begin : g_chain
    intr_chain_node n (.req(req[u]), .ack_in(a[u]), .grant(grant[u]), .ack_out(a[u+1]));
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic [2:0] exp_g;
      {ack, req} = 4'(v);
      #1;
      exp_g = '0;
      if (ack) begin
        if (req[0]) exp_g = 3'b001;
        else if (req[1]) exp_g = 3'b010;
        else if (req[2]) exp_g = 3'b100;
      end
      checks++;
      if (grant != exp_g || a[3] != (ack && req == 3'b000)) begin
        failures++;
        $display("ack=%0b req=%b: grant %b (exp %b) ack_out %0b", ack, req, grant, exp_g, a[3]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
