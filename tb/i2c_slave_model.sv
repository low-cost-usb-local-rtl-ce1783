// i2c_slave_model: behavioural I2C slave receiver for the testbenches. Not
// synthesizable.
//
// It watches SCL and SDA (open-drain, resolved by the testbench), detects
// START and STOP, shifts in bytes on rising SCL and acknowledges the
// address byte when its 7-bit address matches ADDR and the R/W bit is 0,
// then every data byte until STOP. Received data bytes go to the queue
// data; starts, stops and acknowledged address bytes are counted.
`timescale 1ns/1ps
module i2c_slave_model #(
  parameter logic [6:0] ADDR = 7'h52
) (
  input  logic scl,
  input  logic sda,
  output logic sda_drive_low
);

  logic [7:0] data[$];
  int         starts = 0, stops = 0, addr_acks = 0, bytes = 0;
  logic [7:0] sh;
  int         nbits;
  logic       selected, in_addr, ack_phase;

  initial begin
    sda_drive_low = 1'b0;
    selected = 1'b0; in_addr = 1'b0; ack_phase = 1'b0; nbits = 0; sh = '0;
  end

  always @(negedge sda) if (scl) begin
    starts++;
    in_addr = 1'b1; selected = 1'b0; nbits = 0; ack_phase = 1'b0;
    sda_drive_low = 1'b0;
  end

  always @(posedge sda) if (scl) begin
    stops++;
    in_addr = 1'b0; selected = 1'b0; nbits = 0; ack_phase = 1'b0;
  end

  always @(posedge scl) begin
    if (!ack_phase && (in_addr || selected)) begin
      sh = {sh[6:0], sda};
      nbits++;
    end
  end

  always @(negedge scl) begin
    if (ack_phase) begin
      ack_phase = 1'b0;
      sda_drive_low = 1'b0;
    end else if (nbits == 8) begin
      nbits = 0;
      if (in_addr) begin
        in_addr = 1'b0;
        if (sh[7:1] == ADDR && !sh[0]) begin
          selected = 1'b1;
          addr_acks++;
          sda_drive_low = 1'b1;
          ack_phase = 1'b1;
        end
      end else if (selected) begin
        data.push_back(sh);
        bytes++;
        sda_drive_low = 1'b1;
        ack_phase = 1'b1;
      end
    end
  end

endmodule
