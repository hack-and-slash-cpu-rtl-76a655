// Test program for tb_inst_mem
1b05
0000
0c10
1900
abcd
