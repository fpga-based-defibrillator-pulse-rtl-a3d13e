0ba3
0ebd
0df7
06fb
0254
03e1
ffce
fc18
1f40
8000
7fff
f830
0000
ffff
0123
a5c3
