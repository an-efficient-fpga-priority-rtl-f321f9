// qq_value_router_tb: self-checking test of the compare-and-route unit.
// Random items with few distinct keys (so ties are frequent) are driven in
// all three modes, to a min-queue and a max-queue build; the expected
// outputs are computed from the key fields directly: smaller (max build:
// larger) key placed, the temp item on a tie, the other carried.
module qq_value_router_tb;
  import quickq_pkg::*;
  localparam int unsigned DATA_W = 24;
  localparam int unsigned KEY_W  = 8;

  route_e            mode;
  logic [DATA_W-1:0] temp, ram, place, carry, place_max, carry_max;
  logic [DATA_W-1:0] exp_place, exp_carry;
  int checks = 0, failures = 0, ties = 0;

  qq_value_router #(.DATA_W(DATA_W), .KEY_W(KEY_W)) dut (
    .mode_i(mode), .temp_i(temp), .ram_i(ram), .place_o(place), .carry_o(carry));

  // the same unit built for a max queue
  qq_value_router #(.DATA_W(DATA_W), .KEY_W(KEY_W), .MIN_QUEUE(1'b0)) dut_max (
    .mode_i(mode), .temp_i(temp), .ram_i(ram), .place_o(place_max), .carry_o(carry_max));
  logic [DATA_W-1:0] exp_place_max, exp_carry_max;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int unsigned tk, rk, m;
      tk = $urandom_range(7) * 31;
      rk = $urandom_range(7) * 31;
      m  = $urandom_range(2);
      temp = {KEY_W'(tk), 16'($urandom)};
      ram  = {KEY_W'(rk), 16'($urandom)};
      mode = (m == 0) ? RT_INSERT : (m == 1) ? RT_SHIFT : RT_LOAD;
      if (m == 0) begin
        if (tk == rk) ties++;
        if (tk <= rk) begin exp_place = temp; exp_carry = ram;  end
        else          begin exp_place = ram;  exp_carry = temp; end
        if (tk >= rk) begin exp_place_max = temp; exp_carry_max = ram;  end
        else          begin exp_place_max = ram;  exp_carry_max = temp; end
      end else if (m == 1) begin
        exp_place = ram; exp_carry = ram;
        exp_place_max = ram; exp_carry_max = ram;
      end else begin
        exp_place = temp; exp_carry = temp;
        exp_place_max = temp; exp_carry_max = temp;
      end
      #1;
      checks++;
      if (place !== exp_place || carry !== exp_carry) begin
        failures++;
        $display("FAIL mode=%0d temp=%h ram=%h place=%h carry=%h", m, temp, ram, place, carry);
      end
      checks++;
      if (place_max !== exp_place_max || carry_max !== exp_carry_max) begin
        failures++;
        $display("FAIL max mode=%0d temp=%h ram=%h place=%h carry=%h", m, temp, ram, place_max, carry_max);
      end
    end
    // all-ones default item sorts behind every real key
    mode = RT_INSERT; temp = {KEY_W'(8'hFE), 16'h0001}; ram = '1; #1;
    checks++;
    if (place !== temp || carry !== ram) begin
      failures++;
      $display("FAIL default item not last");
    end
    checks++;
    if (ties == 0) begin
      failures++;
      $display("FAIL no tie exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
