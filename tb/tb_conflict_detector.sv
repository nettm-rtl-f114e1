// tb_conflict_detector: random signature rows, versions and requests checked
// against a model of the conflict rules (load vs other writers, store vs
// other readers and writers, only Valid slices count) and of the lazy-clear
// row update.
module tb_conflict_detector;
  import nettm_pkg::*;
  sig_row_t row, new_row;
  logic [NUM_THREADS-1:0][VER_W-1:0] cur_ver;
  logic [NUM_THREADS-1:0] live, valid, conflict_mask;
  logic [TID_W-1:0] req_tid;
  logic req_store, req_tx, conflict;
  int checks = 0, failures = 0;
  int n_conf = 0;

  conflict_detector dut (.*);

  initial begin
    for (int n = 0; n < 20000; n++) begin
      automatic logic [NUM_THREADS-1:0] e_mask = '0;
      automatic logic [31:0] e_row;
      row       = $urandom;
      cur_ver   = 16'($urandom);
      if (n % 3 == 0)  // make most slices current
        for (int i = 0; i < NUM_THREADS; i++) cur_ver[i] = row[i].ver;
      live      = 8'($urandom);
      req_tid   = 3'($urandom);
      req_store = 1'($urandom);
      req_tx    = 1'($urandom);
      #1;
      for (int i = 0; i < NUM_THREADS; i++) begin
        automatic logic [3:0] s = row[i];           // {rd, wr, ver}
        automatic logic v = live[i] && s[1:0] == cur_ver[i];
        automatic logic hit = req_store ? (s[3] | s[2]) : s[2];
        if (i != req_tid && v && hit) e_mask[i] = 1;
        e_row[4*i +: 4] = (s[1:0] == cur_ver[i]) ? s : {2'b00, cur_ver[i]};
      end
      if (req_tx && e_mask == 0) e_row[4*req_tid + (req_store ? 2 : 3)] = 1'b1;
      checks++;
      if (conflict_mask !== e_mask || conflict !== (e_mask != 0) || new_row !== e_row) begin
        failures++;
        if (failures < 10)
          $display("FAIL row=%h mask=%b/%b new=%h/%h", row, conflict_mask, e_mask, new_row, e_row);
      end
      if (e_mask != 0) n_conf++;
    end
    checks++; if (n_conf < 100) failures++;
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
