// tb_pa_ram_read_arbitor: checks request selection, grants and data routing.
//
// Two requesters (ID and OF) raise random requests and hold each one until it is
// granted; MEM_INTERFACE answers valid at random. Each cycle the testbench checks
// that the request passed on belongs to OF whenever OF asks (OF has priority),
// otherwise to ID, that a grant goes to exactly the selected requester and only
// when the answer is valid, and that the answer data reaches both data outputs.
// It also checks that no request waits for ever (ID is granted once OF is idle).
module tb_pa_ram_read_arbitor;
  import pa8051_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       id_req, id_gnt, of_req, of_gnt, mi_req, mi_valid;
  mem_read_t  id_read, of_read, mi_read;
  mem_rdata_t id_data, of_data, mi_data;

  pa_ram_read_arbitor dut (.clk, .rst_n, .id_req, .id_read, .id_gnt, .id_data,
                           .of_req, .of_read, .of_gnt, .of_data,
                           .mi_req, .mi_read, .mi_valid, .mi_data);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_of = 0, n_id = 0, n_wait = 0;

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic mem_read_t rand_read();
    mem_read_t r;
    r = '0;
    r.s1.addr = 8'($urandom);
    r.s2.addr = 8'($urandom);
    r.d1addr  = 8'($urandom);
    r.color   = 1'($urandom);
    return r;
  endfunction

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int id_age;
    rst_n = 1'b0;
    id_req = 1'b0; of_req = 1'b0; mi_valid = 1'b0;
    id_read = '0; of_read = '0; mi_data = '0;
    id_age = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      // a new request only after the previous one was granted
      if (!id_req && $urandom_range(0, 3) == 0) begin id_req = 1'b1; id_read = rand_read(); end
      if (!of_req && !of_gnt && $urandom_range(0, 1) == 0) begin of_req = 1'b1; of_read = rand_read(); end
      mi_valid = $urandom_range(0, 3) != 0;
      mi_data  = '{d1: 8'($urandom), d2: 8'($urandom), d3: 8'($urandom),
                   waddr: 8'($urandom), fwd: '{s1: FW_D1, s2: FW_D2}};
      #1;
      check("mi_req", mi_req == (id_req || of_req));
      if (of_req) check("OF selected", mi_read == of_read);
      else if (id_req) check("ID selected", mi_read == id_read);
      check("of_gnt", of_gnt == (of_req && mi_valid));
      check("id_gnt", id_gnt == (id_req && !of_req && mi_valid));
      check("one grant", !(of_gnt && id_gnt));
      check("data to OF", of_data == mi_data);
      check("data to ID", id_data == mi_data);
      if (of_gnt) n_of++;
      if (id_gnt) n_id++;
      id_age = (id_req && !id_gnt) ? id_age + 1 : 0;
      if (id_age > n_wait) n_wait = id_age;
      @(posedge clk);
      #1;
      if (of_gnt) of_req = 1'b0;
      if (id_gnt) id_req = 1'b0;
    end
    $display("grants: OF %0d, ID %0d; longest ID wait %0d cycles", n_of, n_id, n_wait);
    check("both served", n_of > 100 && n_id > 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
