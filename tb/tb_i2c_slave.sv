// tb_i2c_slave - testbench model of an I2C device with 256 byte registers
// (standing in for the reference oscillator). It answers its address ADDR,
// takes the first written byte as register pointer and further bytes as data
// (pointer incrementing), and sends register data on reads until the master
// answers NACK. Bits are taken on the rising SCL edge; SDA is driven only
// after SCL falls. It counts START and STOP conditions, register writes and
// reads.
module tb_i2c_slave #(
  parameter logic [6:0] ADDR = 7'h55
) (
  input  logic scl,
  input  logic sda,
  output logic sda_low,
  output int   n_start,
  output int   n_stop,
  output int   n_write,
  output int   n_read
);
  logic [7:0] regs [256];
  logic [7:0] ptr, sh;
  int  bitcnt;
  bit  active, selected, tx, first_byte, mack, load_next;
  initial begin
    sda_low = 0; n_start = 0; n_stop = 0; n_write = 0; n_read = 0;
    active = 0; selected = 0; tx = 0; bitcnt = 0; ptr = 0; load_next = 0;
    for (int i = 0; i < 256; i++) regs[i] = 8'(i * 7 + 3);
  end
  // START / STOP: SDA edges while SCL is high
  always @(negedge sda) if (scl) begin
    n_start++; active = 1; selected = 0; tx = 0; bitcnt = 0; sda_low = 0; first_byte = 1;
  end
  always @(posedge sda) if (scl) begin
    n_stop++; active = 0; tx = 0; sda_low = 0;
  end
  always @(posedge scl) if (active) begin
    bitcnt++;
    if (bitcnt <= 8 && !tx) sh = {sh[6:0], sda};
    if (bitcnt == 9 && tx) mack = !sda;
  end
  always @(negedge scl) if (active) begin
    if (bitcnt == 8) begin
      if (tx) sda_low = 0;              // leave the acknowledge to the master
      else if (!selected) begin
        if (sh[7:1] == ADDR) begin selected = 1; sda_low = 1; load_next = sh[0]; end
        else active = 0;
      end else begin
        if (first_byte) ptr = sh; else begin regs[ptr] = sh; ptr++; n_write++; end
        first_byte = 0;
        sda_low = 1;
      end
    end else if (bitcnt == 9) begin
      bitcnt = 0;
      sda_low = 0;
      if (load_next || (tx && mack)) begin
        tx = 1; load_next = 0;
        sh = regs[ptr]; ptr++; n_read++;
        sda_low = !sh[7];
      end else if (tx) begin
        tx = 0; active = 0;               // NACK: the master ends the read
      end
    end else if (tx && bitcnt >= 1 && bitcnt <= 7) begin
      sda_low = !sh[7 - bitcnt];
    end
  end
endmodule
