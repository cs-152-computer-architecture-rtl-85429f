// tb_irq_prio: every request pattern with random masks and enables; the
// expected winner is the lowest-numbered pending line.
module tb_irq_prio;
  logic [7:0] irq, mask, pending;
  logic       ie, req;
  logic [2:0] id;
  int checks = 0, failures = 0;

  irq_prio dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      for (int r = 0; r < 8; r++) begin
        int eid;
        irq  = 8'(v);
        mask = (r == 0) ? 8'hFF : 8'($urandom);
        ie   = (r != 7);
        #1;
        eid = -1;
        for (int i = 0; i < 8; i++) if (eid < 0 && irq[i] && mask[i]) eid = i;
        checks++;
        if (pending !== (irq & mask) || req !== (ie && eid >= 0) || (eid >= 0 && id !== 3'(eid))) begin
          failures++;
          if (failures < 10) $display("FAIL irq %b mask %b ie %b: req %b id %0d", irq, mask, ie, req, id);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
